// tb_tcam_backup_cam: the backup CAM on its own gated clock.
//
// Stores and clears full-width ternary words (including words whose low bits
// are don't care) and searches with keys derived from them and with random
// keys. The match lines after each search edge, the slot of the next store
// (lowest free) and the full flag are compared with a model in the testbench.
module tb_tcam_backup_cam;
  localparam int KW = 12, D = 4;
  logic gclk = 0, rst_n = 1, wr = 0, clr = 0, full;
  logic [1:0] clr_slot = 0;
  logic [KW-1:0] wr_key = 0, wr_care = 0, srch_key = 0;
  logic [D-1:0] ml;
  logic [1:0] wr_slot;
  int checks = 0, failures = 0, n_hit = 0;
  tcam_backup_cam #(.KEY_W(KW), .DEPTH(D)) dut (.*);

  logic [KW-1:0] m_d [D], m_c [D];
  logic [D-1:0] m_v;
  int n_clr = 0;

  function automatic int lowest_free();
    for (int i = 0; i < D; i++) if (!m_v[i]) return i;
    return -1;
  endfunction

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
    #1 rst_n = 0;
    #4 rst_n = 1;
    m_v = 0;
    for (int t = 0; t < 400; t++) begin
      logic [D-1:0] e;
      if (t % 100 == 0) begin rst_n = 0; #1 rst_n = 1; m_v = 0; end
      wr = (lowest_free() >= 0) && ($urandom_range(0, 3) == 0);
      clr = !wr && ($urandom_range(0, 7) == 0);
      clr_slot = 2'($urandom);
      wr_key = KW'($urandom); wr_care = KW'($urandom) | KW'($urandom);
      srch_key = KW'($urandom);
      if (m_v != 0 && $urandom_range(0, 1)) begin
        automatic int j = $urandom_range(0, D - 1);
        if (m_v[j]) srch_key = m_d[j] | (srch_key & ~m_c[j]);
      end
      if (lowest_free() >= 0) chk(int'(wr_slot) == lowest_free(), "wr_slot");
      #5 gclk = 1;
      if (wr) begin
        automatic int f = lowest_free();
        m_d[f] = wr_key & wr_care; m_c[f] = wr_care; m_v[f] = 1;
      end else if (clr) begin
        m_v[clr_slot] = 0; n_clr++;
      end
      #5 gclk = 0;
      chk(full == (m_v == '1), "full");
      if (!wr && !clr) begin
        e = 0;
        for (int i = 0; i < D; i++) e[i] = m_v[i] && (((srch_key ^ m_d[i]) & m_c[i]) == 0);
        chk(ml == e, $sformatf("ml got %b exp %b", ml, e));
        if (e != 0) n_hit++;
      end
    end
    chk(n_hit > 20, "hits seen");
    chk(n_clr > 5, "clears seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
