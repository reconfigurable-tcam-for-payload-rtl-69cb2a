// tb_payload_window: random byte stream with gaps into the six-byte window.
// The registered window and the look-ahead win_next are compared with a
// model history of the accepted bytes; win_valid must follow each byte.
module tb_payload_window;
  localparam int WC = 6;
  logic clk = 0, rst_n = 1, in_valid = 0, win_valid;
  logic [7:0] in_byte = 0;
  logic [8*WC-1:0] window, win_next;
  int checks = 0, failures = 0;
  payload_window #(.WIN_CHARS(WC)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] hist [WC];
    logic [8*WC-1:0] m_win, m_next;
    bit last_valid;
    #1 rst_n = 0;
    for (int i = 0; i < WC; i++) hist[i] = 0;
    last_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int i = 0; i < WC; i++) m_win[8*i +: 8] = hist[i];
      chk(window == m_win, "window");
      chk(win_valid == last_valid, "win_valid");
      in_valid = $urandom_range(0, 3) != 0;
      in_byte = 8'($urandom);
      #1;
      if (in_valid) m_next = {m_win[8*WC-9:0], in_byte}; else m_next = m_win;
      chk(win_next == m_next, "win_next");
      if (in_valid) begin
        for (int i = WC - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = in_byte;
      end
      last_valid = in_valid;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
