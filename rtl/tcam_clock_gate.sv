// tcam_clock_gate: stage 2 of the TCAM, one clock gate per bank.
//
// gclk follows clk only while en is high, so a bank that is not selected sees
// no clock edge and its flip-flops do not toggle. The document describes the
// gate as an AND of clock and enable. Here the enable is first held in a latch
// that is transparent while clk is low (the usual integrated clock gate), so
// an enable that changes while clk is high cannot cut or stretch a pulse. The
// latch is intentional and is the only latch in the design.
//
// Timing: en must be valid before the rising edge of clk it is meant to pass;
// it is sampled while clk is low and held while clk is high.
module tcam_clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = clk & en_lat;

endmodule
