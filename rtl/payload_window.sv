// payload_window: sliding window over the payload byte stream.
//
// Each accepted byte enters at the low end and the oldest of the WIN_CHARS
// bytes falls out, so window[7:0] is the newest byte and
// window[8*WIN_CHARS-1 -: 8] the oldest. The whole window is the TCAM search
// key; because the newest byte sits in the least significant bits, the TCAM's
// bank selector bits always come from a byte that every stored sub-pattern
// specifies. The six-byte shift register follows the document's simulation;
// the byte order is this design's choice.
//
// Timing: win_next is combinational, the window as it will be once the byte
// now on in_byte is taken, so a search can use it in the byte's own cycle.
// window and win_valid follow one cycle later. Reset fills the window with
// zero bytes.
module payload_window
  import tcam_pkg::*;
#(
  parameter int unsigned WIN_CHARS = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [CHAR_W-1:0]        in_byte,
  output logic [CHAR_W*WIN_CHARS-1:0] window,
  output logic [CHAR_W*WIN_CHARS-1:0] win_next,
  output logic                     win_valid
);

  assign win_next = in_valid ? {window[CHAR_W*(WIN_CHARS-1)-1:0], in_byte} : window;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      window    <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= in_valid;
      window    <= win_next;
    end
  end

endmodule
