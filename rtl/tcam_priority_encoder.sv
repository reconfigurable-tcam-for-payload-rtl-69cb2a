// tcam_priority_encoder: stage 5 of the TCAM.
//
// Turns the match lines into one address: the lowest-numbered line that is
// high wins, and hit says whether any line is high (addr is 0 otherwise).
// Lowest-index-first is this design's priority rule. Purely combinational.
module tcam_priority_encoder #(
  parameter int unsigned N = 24,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  ml,
  output logic          hit,
  output logic [AW-1:0] addr
);

  always_comb begin
    hit  = 1'b0;
    addr = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (ml[i]) begin
        hit  = 1'b1;
        addr = AW'(i);
      end
    end
  end

endmodule
