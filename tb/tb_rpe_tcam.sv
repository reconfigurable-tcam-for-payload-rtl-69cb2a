// tb_rpe_tcam: self-checking test of the bank-selected TCAM.
//
// A small instance (16-bit keys, 4 banks of 4 words, 4-word backup CAM) is
// driven with random stores, deletes and searches. A reference model in the
// testbench keeps its own copy of every stored word, with the same address
// map, lowest-free-slot allocation and priority, and predicts each update and
// delete answer (one cycle later) and each search result (two cycles later).
// Searches are biased towards stored words with their don't-care bits
// flipped. The test also counts that banks overflowed into the backup CAM,
// that deleted slots were reused, that a store failed when everything was
// full and that a word with don't-care selector bits went to the backup CAM,
// and checks that the clock gates kept every unselected bank still. A second
// instance built without the filtering multiplexer (FILTER_MUX = 0) runs on
// the same inputs and must give identical outputs every cycle.
module tb_rpe_tcam;
  localparam int KW = 16, SW = 2, BD = 4, UD = 4, NB = 4;
  localparam int AW = $clog2(NB * BD + UD);

  logic clk = 0, rst_n = 1;
  logic srch_valid = 0, upd_valid = 0, del_valid = 0, del_done;
  logic [KW-1:0] srch_key = 0, upd_key = 0, upd_care = 0;
  logic upd_done, upd_ok, upd_to_buc, res_valid, res_hit;
  logic [AW-1:0] upd_addr, res_addr, del_addr = 0;
  logic [BD+UD-1:0] res_mls;

  rpe_tcam #(.KEY_W(KW), .SEL_W(SW), .BANK_DEPTH(BD), .BUC_DEPTH(UD)) dut (.*);

  // the same TCAM without the filtering multiplexer (a comparator per bank)
  logic n_del_done, n_upd_done, n_upd_ok, n_upd_to_buc, n_res_valid, n_res_hit;
  logic [AW-1:0] n_upd_addr, n_res_addr;
  logic [BD+UD-1:0] n_res_mls;
  rpe_tcam #(.KEY_W(KW), .SEL_W(SW), .BANK_DEPTH(BD), .BUC_DEPTH(UD), .FILTER_MUX(1'b0)) dut_nf (
    .clk, .rst_n, .srch_valid, .srch_key, .upd_valid, .upd_key, .upd_care, .del_valid, .del_addr, .del_done(n_del_done),
    .upd_done(n_upd_done), .upd_ok(n_upd_ok), .upd_addr(n_upd_addr), .upd_to_buc(n_upd_to_buc),
    .res_valid(n_res_valid), .res_hit(n_res_hit), .res_addr(n_res_addr), .res_mls(n_res_mls));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_del = 0, n_reuse = 0;
  logic e_del;
  int n_buc = 0, n_fail = 0, n_hit = 0, n_miss = 0, n_wild = 0, n_gate_bad = 0;

  // reference model
  logic [KW-1:0] m_val [NB*BD+UD];
  logic [KW-1:0] m_care[NB*BD+UD];
  logic          m_vld [NB*BD+UD];
  logic          m_used[NB*BD+UD];

  function automatic int free_in(int base, int n);
    for (int a = base; a < base + n; a++) if (!m_vld[a]) return a;
    return -1;
  endfunction

  // expectations in flight
  logic e_upd, e_ok, e_buc; logic [AW-1:0] e_uaddr;
  logic e_s1, e_s2, e_h1, e_h2; logic [AW-1:0] e_a1, e_a2;

  function automatic bit tmatch(logic [KW-1:0] k, int a);
    return m_vld[a] && (((k ^ m_val[a]) & m_care[a]) == 0);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // clock-gating observation: count gated edges per bank each cycle
  int gedges [NB];
  for (genvar b = 0; b < NB; b++) begin : g_mon
    always @(posedge dut.g_bank[b].gclk) gedges[b]++;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < NB*BD+UD; a++) begin m_vld[a] = 0; m_used[a] = 0; end
    for (int b = 0; b < NB; b++) gedges[b] = 0;
    e_del = 0;
    e_upd = 0; e_s1 = 0; e_s2 = 0; e_h1 = 0; e_h2 = 0; e_a1 = 0; e_a2 = 0;
    e_ok = 0; e_buc = 0; e_uaddr = 0;
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int ge0 [NB];
      int exp_bank;
      bit do_upd, do_del, do_srch;
      @(negedge clk);
      // ---- check what the last edge produced ----
      check(upd_done == e_upd, "upd_done");
      check(del_done == e_del, "del_done");
      if (e_upd) begin
        check(upd_ok == e_ok, "upd_ok");
        if (e_ok) begin
          check(upd_addr == e_uaddr, $sformatf("upd_addr got %0d exp %0d", upd_addr, e_uaddr));
          check(upd_to_buc == e_buc, "upd_to_buc");
        end
      end
      check(res_valid == e_s2, "res_valid latency");
      if (e_s2) begin
        check(res_hit == e_h2, "res_hit");
        if (e_h2) check(res_addr == e_a2, $sformatf("res_addr got %0d exp %0d", res_addr, e_a2));
      end
      check({n_del_done, n_upd_done, n_upd_ok, n_upd_addr, n_upd_to_buc, n_res_valid, n_res_hit, n_res_addr, n_res_mls}
            == {del_done, upd_done, upd_ok, upd_addr, upd_to_buc, res_valid, res_hit, res_addr, res_mls},
            "variant without filtering multiplexer agrees");
      e_s2 = e_s1; e_h2 = e_h1; e_a2 = e_a1; e_s1 = 0; e_upd = 0; e_del = 0;
      // ---- drive the next operation ----
      do_upd  = (cyc < 1500) ? ($urandom_range(0, 9) < 2) : ($urandom_range(0, 29) == 0);
      do_del  = !do_upd && ($urandom_range(0, 11) == 0);
      do_srch = $urandom_range(0, 3) != 0;
      upd_valid = do_upd; del_valid = do_del; srch_valid = do_srch;
      upd_key = KW'($urandom); upd_care = KW'($urandom) | KW'($urandom);
      if ($urandom_range(0, 3) != 0) upd_care[SW-1:0] = '1;
      else n_wild += int'(upd_care[SW-1:0] != '1);
      del_addr = AW'($urandom_range(0, NB*BD+UD+1));   // a few beyond the table
      srch_key = KW'($urandom);
      if ($urandom_range(0, 2) != 0) begin
        automatic int a = $urandom_range(0, NB*BD+UD-1);
        if (m_vld[a]) srch_key = (m_val[a] & m_care[a]) | (srch_key & ~m_care[a]);
      end
      exp_bank = -1;
      if (do_upd) begin
        automatic int b = int'(upd_key[SW-1:0]);
        automatic int fb = free_in(b*BD, BD);
        automatic int fu = free_in(NB*BD, UD);
        e_upd = 1;
        if (upd_care[SW-1:0] == '1 && fb >= 0) begin
          m_val[fb] = upd_key & upd_care; m_care[fb] = upd_care; m_vld[fb] = 1;
          if (m_used[fb]) n_reuse++;
          m_used[fb] = 1;
          e_ok = 1; e_buc = 0; e_uaddr = AW'(fb); exp_bank = b;
        end else if (fu >= 0) begin
          m_val[fu] = upd_key & upd_care; m_care[fu] = upd_care; m_vld[fu] = 1;
          e_ok = 1; e_buc = 1; e_uaddr = AW'(fu); n_buc++;
        end else begin
          e_ok = 0; n_fail++;
        end
      end else if (do_del) begin
        e_del = 1;
        if (int'(del_addr) < NB*BD+UD) begin
          if (m_vld[del_addr]) n_del++;
          m_vld[del_addr] = 0;
          if (int'(del_addr) < NB*BD) exp_bank = int'(del_addr) / BD;
        end
      end else if (do_srch) begin
        automatic int b = int'(srch_key[SW-1:0]);
        exp_bank = b;
        e_s1 = 1; e_h1 = 0; e_a1 = 0;
        for (int a = NB*BD+UD-1; a >= NB*BD; a--) if (tmatch(srch_key, a)) begin e_h1 = 1; e_a1 = AW'(a); end
        for (int a = b*BD+BD-1; a >= b*BD; a--) if (tmatch(srch_key, a)) begin e_h1 = 1; e_a1 = AW'(a); end
        if (e_h1) n_hit++; else n_miss++;
      end
      // ---- clock gating: only the selected bank may see an edge ----
      for (int b = 0; b < NB; b++) ge0[b] = gedges[b];
      @(posedge clk); #1;
      for (int b = 0; b < NB; b++)
        if (gedges[b] - ge0[b] != int'(b == exp_bank)) n_gate_bad++;
    end
    check(n_gate_bad == 0, "clock gates");
    check(n_buc > 0, "bank overflow into backup CAM happened");
    check(n_fail > 0, "store refused when full happened");
    check(n_wild > 0, "wildcard selector store happened");
    check(n_hit > 50 && n_miss > 50, "hits and misses both seen");
    check(n_del > 20, "deletes of stored words happened");
    check(n_reuse > 5, "freed bank slots reused");
    $display("deleted=%0d reused=%0d", n_del, n_reuse);
    $display("overflow_to_buc=%0d refused=%0d hits=%0d misses=%0d gate_errors=%0d",
             n_buc, n_fail, n_hit, n_miss, n_gate_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
