// tb_subpattern_seq_engine: random TCAM-result streams into the engine.
//
// Eight slots are loaded with random quotient/remnant indices from a small
// index set (so hits are frequent) and random remnant lengths 0..6. The
// reference model tracks, per slot, the position of the pending quotient:
// a pattern is found when the remnant index arrives exactly r_len results
// after it (r_len = 0: on the quotient itself); results in between are
// ignored, and a quotient arriving in place of the remnant restarts it.
// pat_match is checked cycle by cycle and match_count at the end. Slots are
// reloaded mid-stream, and results come with gaps.
module tb_subpattern_seq_engine;
  localparam int NP = 8, AW = 7, WC = 6;
  logic clk = 0, rst_n = 1;
  logic cfg_valid = 0, cfg_enable = 0, in_valid = 0, in_hit = 0;
  logic [2:0] cfg_slot = 0;
  logic [AW-1:0] cfg_q_idx = 0, cfg_r_idx = 0, in_idx = 0;
  logic [2:0] cfg_r_len = 0;
  logic [NP-1:0] pat_match;
  logic [15:0] match_count;
  int checks = 0, failures = 0;
  subpattern_seq_engine #(.NUM_PATTERNS(NP), .ADDR_W(AW), .WIN_CHARS(WC)) dut (.*);
  always #5 clk = ~clk;

  bit m_en [NP];
  int m_q [NP], m_r [NP], m_len [NP], m_pend [NP];
  int pos = 0, total = 0, n_two = 0, n_one = 0;

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  task automatic load(int s);
    cfg_valid = 1; cfg_slot = 3'(s); cfg_enable = 1'($urandom_range(0, 7) != 0);
    cfg_q_idx = AW'($urandom_range(0, 9)); cfg_r_idx = AW'($urandom_range(0, 9));
    cfg_r_len = 3'($urandom_range(0, WC));
    m_en[s] = cfg_enable; m_q[s] = int'(cfg_q_idx); m_r[s] = int'(cfg_r_idx);
    m_len[s] = int'(cfg_r_len); m_pend[s] = -1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NP-1:0] exp_pm;
    #1 rst_n = 0;
    for (int s = 0; s < NP; s++) begin m_en[s] = 0; m_pend[s] = -1; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < NP; s++) begin load(s); @(negedge clk); end
    cfg_valid = 0;
    exp_pm = 0;
    for (int t = 0; t < 6000; t++) begin
      int reload;
      chk(pat_match == exp_pm, $sformatf("pat_match got %b exp %b", pat_match, exp_pm));
      exp_pm = 0;
      in_valid = $urandom_range(0, 4) != 0;
      in_hit = $urandom_range(0, 4) != 0;
      in_idx = AW'($urandom_range(0, 9));
      reload = (t % 500 == 250) ? $urandom_range(0, NP-1) : -1;
      if (in_valid) begin
        for (int s = 0; s < NP; s++) if (m_en[s] && s != reload) begin
          automatic bit qh = in_hit && int'(in_idx) == m_q[s];
          automatic bit rh = in_hit && int'(in_idx) == m_r[s];
          if (m_pend[s] >= 0 && pos - m_pend[s] < m_len[s]) begin
            // waiting: ignore
          end else if (m_pend[s] >= 0) begin
            if (rh) begin exp_pm[s] = 1; m_pend[s] = -1; n_two++; end
            else if (qh) m_pend[s] = pos;
            else m_pend[s] = -1;
          end else if (qh) begin
            if (m_len[s] == 0) begin exp_pm[s] = 1; n_one++; end
            else m_pend[s] = pos;
          end
        end
        pos++;
      end
      cfg_valid = 0;
      if (reload >= 0) begin
        load(reload);
        exp_pm[reload] = 0;
      end
      total += $countones(exp_pm);
      @(negedge clk);
    end
    chk(pat_match == exp_pm, "last pat_match");
    chk(int'(match_count) == total, $sformatf("match_count got %0d exp %0d", match_count, total));
    chk(n_two > 10 && n_one > 10, "two-stage and single-stage matches both seen");
    $display("two_stage=%0d single=%0d total=%0d", n_two, n_one, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
