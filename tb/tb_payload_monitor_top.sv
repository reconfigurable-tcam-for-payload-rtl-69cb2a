// tb_payload_monitor_top: end-to-end test of the payload monitor at its
// default sizes (6-byte window, 4 banks of 16 words, 8-word backup CAM,
// 8 pattern slots).
//
// Patterns: iambic, able, apps, are, dial, diatonic (longer than the window:
// quotient "diaton" plus remnant "ic"), port0..port3 (one pattern whose last
// byte has don't-care selector bits) and kiwi (added while the stream runs).
// Three quarters through the stream "apps" is deleted from the TCAM, after
// which it must no longer be reported.
// Filler words are stored until a bank overflows, so the remnant "ic" lands
// in the backup CAM. Every update's answer is checked one cycle later. A
// random text with the patterns planted in it is streamed; the expected
// pattern pulses come from a plain string search of the text in the
// testbench, and pat_match is compared cycle by cycle, three cycles after each
// pattern's last byte, and match_count at the end. The test counts that it saw
// byte stalls during updates and the delete, bank overflow into the backup CAM, a
// wildcard-selector store, two-stage and single-stage matches, and searches in
// every bank, and fails if any never happened. It also checks that no cycle
// clocks more than one bank and prints the bank clock activity against an
// ungated table.
module tb_payload_monitor_top;
  import tcam_pkg::*;
  localparam int WC = 6, KW = 48, AW = 7, NP = 8;

  logic clk = 0, rst_n = 1;
  logic byte_valid = 0, byte_ready, upd_valid = 0, cfg_valid = 0, cfg_enable = 0;
  logic del_valid = 0, del_done;
  logic [6:0] del_addr = 0;
  logic [23:0] tcam_mls;
  logic [7:0] byte_in = 0;
  logic [KW-1:0] upd_key = 0, upd_care = 0;
  logic upd_done, upd_ok, upd_to_buc, tcam_hit;
  logic [AW-1:0] upd_addr, tcam_addr, cfg_q_idx = 0, cfg_r_idx = 0;
  logic [2:0] cfg_slot = 0, cfg_r_len = 0;
  logic [NP-1:0] pat_match;
  logic [15:0] match_count;

  payload_monitor_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  int n_del = 0, n_stall = 0, n_overflow = 0, n_wild = 0, n_two = 0, n_one = 0;
  int bank_edges [4];
  int edges_this_cycle = 0, n_multi_bank = 0, n_cycles_run = 0;
  for (genvar b = 0; b < 4; b++) begin : g_mon
    always @(posedge dut.u_tcam.g_bank[b].gclk) begin
      bank_edges[b]++;
      edges_this_cycle++;
    end
  end
  // at most one of the four banks may be clocked in any cycle
  always @(negedge clk) begin
    if (edges_this_cycle > 1) n_multi_bank++;
    edges_this_cycle = 0;
    n_cycles_run++;
  end

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle %0d", s, cyc); end
  endtask

  // sub-pattern string -> key/care, last character in the low byte;
  // '#' stands for the digits 0..3 (low two bits don't care)
  function automatic void mk(string s, output logic [KW-1:0] k, output logic [KW-1:0] c);
    k = 0; c = 0;
    for (int i = 0; i < s.len(); i++) begin
      automatic int bi = s.len() - 1 - i;
      if (s[i] == "#") begin k[8*bi +: 8] = 8'h30; c[8*bi +: 8] = 8'hFC; end
      else begin k[8*bi +: 8] = s[i]; c[8*bi +: 8] = 8'hFF; end
    end
  endfunction

  // one TCAM store; returns the index, checks the one-cycle answer
  task automatic store(string s, output int idx, output bit to_buc);
    logic [KW-1:0] k, c;
    mk(s, k, c);
    upd_valid = 1; upd_key = k; upd_care = c;
    @(negedge clk);
    upd_valid = 0;
    chk(upd_done && upd_ok, {"update answer for ", s});
    idx = int'(upd_addr); to_buc = upd_to_buc;
    if (to_buc && c[1:0] == 2'b11) n_overflow++;
    if (to_buc && c[1:0] != 2'b11) n_wild++;
    if (c[1:0] != 2'b11) chk(to_buc, "wildcard selector goes to backup CAM");
  endtask

  task automatic config_slot(int s, int q, int r, int rl);
    cfg_valid = 1; cfg_slot = 3'(s); cfg_enable = 1;
    cfg_q_idx = AW'(q); cfg_r_idx = AW'(r); cfg_r_len = 3'(rl);
    @(negedge clk);
    cfg_valid = 0;
  endtask

  string pats [NP];
  byte   text [$];
  int    acc_cycle [$];
  logic [NP-1:0] exp_pm [int];

  function automatic bit ends_at(int slot, int p);
    string s = pats[slot];
    if (p + 1 < s.len()) return 0;
    for (int i = 0; i < s.len(); i++) begin
      automatic byte t = text[p - (s.len() - 1 - i)];
      if (s[i] == "#") begin if (!(t >= "0" && t <= "3")) return 0; end
      else if (t != s[i]) return 0;
    end
    return 1;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx, qi, ri, kiwi_at, apps_idx, del_at;
    bit bu;
    string words [$];
    string fill_ch;
    int expected_total, expected_kiwi_from;
    for (int b = 0; b < 4; b++) bank_edges[b] = 0;
    pats = '{"iambic", "able", "apps", "are", "dial", "diatonic", "port#", "kiwi"};
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- load sub-patterns and the engine ----
    store("iambic", idx, bu); config_slot(0, idx, 0, 0);
    store("able",   idx, bu); config_slot(1, idx, 0, 0);
    store("apps",   idx, bu); config_slot(2, idx, 0, 0); apps_idx = idx;
    store("are",    idx, bu); config_slot(3, idx, 0, 0);
    store("dial",   idx, bu); config_slot(4, idx, 0, 0);
    store("diaton", qi, bu);
    // fillers ending in 0xE3 (same bank as 'c') until that bank overflows
    for (int f = 0; f < 20; f++) begin
      string s;
      s = $sformatf("%c%c%c%c%c%c", 8'hF0 + f, 8'hF1, 8'hF2, 8'hF3, 8'hF4, 8'hE3);
      store(s, idx, bu);
      if (bu) break;
    end
    store("ic", ri, bu);
    chk(bu, "remnant stored in backup CAM after overflow");
    config_slot(5, qi, ri, 2);
    store("port#", idx, bu); config_slot(6, idx, 0, 0);

    // ---- stream ----
    words = '{"iambic", "able", "apps", "are", "dial", "diatonic", "port0", "port3", "port2"};
    fill_ch = "xyzqvfgh.-";
    kiwi_at = -1;
    expected_kiwi_from = 1 << 30;
    for (int w = 0; w < 400; w++) begin
      string s;
      if (w == 200) kiwi_at = text.size();
      if (w > 230 && $urandom_range(0, 3) == 0) s = "kiwi";
      else s = words[$urandom_range(0, words.size() - 1)];
      repeat ($urandom_range(1, 4)) text.push_back(fill_ch[$urandom_range(0, fill_ch.len() - 1)]);
      for (int i = 0; i < s.len(); i++) text.push_back(s[i]);
    end
    del_at = (text.size() * 3) / 4;
    for (int p = 0; p < text.size(); p++) begin
      byte_valid = 1; byte_in = text[p];
      if (p == del_at) begin
        // remove "apps" from the TCAM while the stream runs
        del_valid = 1; del_addr = 7'(apps_idx);
        #1 chk(!byte_ready, "byte_ready low during delete");
        n_stall++;
        @(negedge clk);
        del_valid = 0;
        chk(del_done, "delete answered after one cycle");
        n_del++;
      end
      if (p == kiwi_at) begin
        // add a pattern while the stream runs: the byte waits one cycle
        logic [KW-1:0] k, c;
        mk("kiwi", k, c);
        upd_valid = 1; upd_key = k; upd_care = c;
        #1 chk(!byte_ready, "byte_ready low during update");
        n_stall++;
        @(negedge clk);
        upd_valid = 0;
        chk(upd_done && upd_ok, "mid-stream update answer");
        config_slot(7, int'(upd_addr), 0, 0);   // this cycle the byte is taken
        acc_cycle.push_back(cyc + 1);
        expected_kiwi_from = p + 1;
        continue;
      end
      acc_cycle.push_back(cyc + 1);   // taken at the coming rising edge
      @(negedge clk);
    end
    byte_valid = 0;

    // expected pulses
    expected_total = 0;
    for (int p = 0; p < text.size(); p++) begin
      for (int s = 0; s < NP; s++) begin
        if (s == 7 && p < expected_kiwi_from + 4) continue;
        if (s == 2 && p >= del_at) continue;     // "apps" deleted
        if (ends_at(s, p)) begin
          automatic int c = acc_cycle[p] + 2;
          if (!exp_pm.exists(c)) exp_pm[c] = 0;
          exp_pm[c][s] = 1;
          expected_total++;
          if (s == 5) n_two++; else n_one++;
        end
      end
    end
    repeat (5) @(negedge clk);
    foreach (exp_pm[c])
      chk(obs_pm.exists(c) && obs_pm[c] == exp_pm[c],
          $sformatf("pat_match at cycle %0d got %b exp %b", c, obs_pm.exists(c) ? obs_pm[c] : '0, exp_pm[c]));
    foreach (obs_pm[c])
      if (!exp_pm.exists(c)) chk(0, $sformatf("unexpected pat_match %b at cycle %0d", obs_pm[c], c));
    chk(int'(match_count) == expected_total,
        $sformatf("match_count got %0d exp %0d", match_count, expected_total));
    chk(n_stall > 0, "stall happened");
    chk(n_del > 0, "delete happened");
    chk(n_overflow > 0, "bank overflow into backup CAM happened");
    chk(n_wild > 0, "wildcard-selector store happened");
    chk(n_two > 0 && n_one > 0, "two-stage and single-stage matches happened");
    for (int b = 0; b < 4; b++) chk(bank_edges[b] > 0, $sformatf("bank %0d searched", b));
    chk(n_multi_bank == 0, "never more than one bank clocked in a cycle");
    $display("bank clock edges %0d over %0d cycles x 4 banks = %0d%% of ungated activity",
             bank_edges[0] + bank_edges[1] + bank_edges[2] + bank_edges[3], n_cycles_run,
             100 * (bank_edges[0] + bank_edges[1] + bank_edges[2] + bank_edges[3]) / (4 * n_cycles_run));
    $display("bytes=%0d matches=%0d two_stage=%0d single=%0d stalls=%0d overflow=%0d wildcard=%0d bank_edges=%0d/%0d/%0d/%0d",
             text.size(), expected_total, n_two, n_one, n_stall, n_overflow, n_wild,
             bank_edges[0], bank_edges[1], bank_edges[2], bank_edges[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pat_match pulses as seen, by cycle; compared with exp_pm at the end
  logic [NP-1:0] obs_pm [int];
  always @(negedge clk) if (rst_n && pat_match != '0) obs_pm[cyc] = pat_match;

endmodule
