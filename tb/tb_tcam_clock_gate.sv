// tb_tcam_clock_gate: checks the latch-based clock gate.
//
// The enable is changed at random times, both while the clock is low and
// while it is high. Each rising edge of the free clock must produce a gated
// edge exactly when the enable was high just before that edge, and an enable
// change while the clock is high must neither start nor cut a gated pulse
// (gclk may only rise with clk and fall with clk).
module tb_tcam_clock_gate;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;
  int gedges = 0;
  logic en_at_rise;
  tcam_clock_gate dut (.*);

  always @(posedge gclk) begin
    gedges++;
    checks++;
    if (clk !== 1'b1) begin failures++; $display("FAIL gclk rose without clk"); end
  end
  always @(negedge gclk) begin
    checks++;
    if (clk !== 1'b0) begin failures++; $display("FAIL gclk fell while clk high"); end
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_on = 0, n_off = 0;
    for (int c = 0; c < 400; c++) begin
      int g0;
      #2 en = 1'($urandom);            // clk low: enable may change
      #3 en_at_rise = en;
      g0 = gedges;
      clk = 1;
      #1;
      checks++;
      if ((gedges - g0) != int'(en_at_rise)) begin
        failures++;
        $display("FAIL cycle %0d en=%b edges=%0d", c, en_at_rise, gedges - g0);
      end
      if (en_at_rise) n_on++; else n_off++;
      #1 en = 1'($urandom);            // clk high: must not affect gclk
      checks++;
      if (gclk !== (clk & en_at_rise)) begin failures++; $display("FAIL glitch"); end
      #3 clk = 0;
    end
    checks++;
    if (n_on == 0 || n_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
