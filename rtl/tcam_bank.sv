// tcam_bank: stage 3a of the TCAM, one bank of flip-flop storage.
//
// The bank holds DEPTH ternary words of DATA_W bits (the key without its
// selector bits, which are implied by the bank number), each with a care mask
// and a valid bit, and a register for the search key. It is clocked only
// through its clock gate, and each gated edge does one of three things:
// wr high stores the word in the lowest free slot (free_slot), clr high
// invalidates slot clr_slot, and otherwise the search key is captured in
// key_q. All words are visible on the outputs so the filter multiplexer and
// comparator can read them. Storage in flip-flops follows the document; the
// lowest-free-slot allocation and the clear are this design's choices.
//
// Timing: a store or clear takes one gated clock edge; free_slot and full
// follow it. Asynchronous active-low reset empties the bank.
module tcam_bank #(
  parameter int unsigned DATA_W = 46,
  parameter int unsigned DEPTH  = 16,
  localparam int unsigned SLOT_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                    gclk,
  input  logic                    rst_n,
  input  logic                    wr,
  input  logic                    clr,
  input  logic [SLOT_W-1:0]       clr_slot,
  input  logic [DATA_W-1:0]       wr_data,
  input  logic [DATA_W-1:0]       wr_care,
  input  logic [DATA_W-1:0]       srch_data,
  output logic [DEPTH*DATA_W-1:0] ent_data,
  output logic [DEPTH*DATA_W-1:0] ent_care,
  output logic [DEPTH-1:0]        ent_valid,
  output logic [DATA_W-1:0]       key_q,
  output logic [SLOT_W-1:0]       free_slot,
  output logic                    full
);

  logic [DATA_W-1:0] data_q [DEPTH];
  logic [DATA_W-1:0] care_q [DEPTH];

  assign full = &ent_valid;

  always_comb begin
    free_slot = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!ent_valid[i]) free_slot = SLOT_W'(i);
    end
  end

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      ent_valid <= '0;
      key_q     <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        data_q[i] <= '0;
        care_q[i] <= '0;
      end
    end else if (wr) begin
      if (!full) begin
        data_q[free_slot]    <= wr_data & wr_care;
        care_q[free_slot]    <= wr_care;
        ent_valid[free_slot] <= 1'b1;
      end
    end else if (clr) begin
      ent_valid[clr_slot] <= 1'b0;
    end else begin
      key_q <= srch_data;
    end
  end

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      ent_data[i*DATA_W +: DATA_W] = data_q[i];
      ent_care[i*DATA_W +: DATA_W] = care_q[i];
    end
  end

endmodule
