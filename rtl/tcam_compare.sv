// tcam_compare: stage 4 of the TCAM, the ternary comparator.
//
// Drives one match line per stored word: ml[i] is high when word i is valid
// and the key equals the stored value in every bit whose care bit is 1. Stored
// values are kept with their don't-care bits cleared, so only the key needs
// masking. Purely combinational, DEPTH parallel comparisons of DATA_W bits.
module tcam_compare #(
  parameter int unsigned DATA_W = 46,
  parameter int unsigned DEPTH  = 16
) (
  input  logic [DATA_W-1:0]       key,
  input  logic [DEPTH*DATA_W-1:0] ent_data,
  input  logic [DEPTH*DATA_W-1:0] ent_care,
  input  logic [DEPTH-1:0]        ent_valid,
  output logic [DEPTH-1:0]        ml
);

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      ml[i] = ent_valid[i] &&
              (((key ^ ent_data[i*DATA_W +: DATA_W]) & ent_care[i*DATA_W +: DATA_W]) == '0);
    end
  end

endmodule
