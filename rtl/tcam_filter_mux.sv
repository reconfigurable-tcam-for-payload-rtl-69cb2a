// tcam_filter_mux: stage 3b of the TCAM, the filtering multiplexer.
//
// Of the NB bank outputs (each W bits: the bank's words, masks, valid bits
// and registered key, flattened) only the one named by sel is passed on, so a
// single bank-sized comparator serves all banks. sel is the registered
// selector of the search in flight. Purely combinational.
module tcam_filter_mux #(
  parameter int unsigned NB = 4,
  parameter int unsigned W  = 1,
  localparam int unsigned SW = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic [SW-1:0]   sel,
  input  logic [NB*W-1:0] din,
  output logic [W-1:0]    dout
);

  always_comb begin
    dout = '0;
    for (int b = 0; b < NB; b++) begin
      if (sel == SW'(b)) dout = din[b*W +: W];
    end
  end

endmodule
