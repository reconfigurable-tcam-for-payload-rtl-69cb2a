// tb_rpe_tcam_bank_sweep: the bank-count design space of the TCAM.
//
// Three TCAMs of the same total bank capacity (32 words) and a 16-word backup
// CAM are built with 2, 4 and 8 banks (SEL_W = 1, 2, 3; BANK_DEPTH = 16, 8,
// 4) and driven with the same 28 stores and 600 back-to-back searches. Each
// instance keeps its own record of the words it accepted, at the addresses
// it returned. For every search its answer must be a hit exactly when one of
// those words matches, and the returned address must hold a matching word.
// The gated bank clocks are counted during the searches: every search must
// clock exactly one bank, so bank clock activity is 1/B of an ungated table.
// Each instance's share is printed.
module tb_rpe_tcam_bank_sweep;
  localparam int KW = 16, TOTAL = 32, UD = 16, NCFG = 3, AW = 6;
  localparam int NSTORE = 28, NSRCH = 600;

  logic clk = 0, rst_n = 1;
  logic srch_valid = 0, upd_valid = 0;
  logic [KW-1:0] srch_key = 0, upd_key = 0, upd_care = 0;
  logic in_search_phase = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // words presented, shared by all instances
  logic [KW-1:0] st_val [NSTORE], st_care [NSTORE];

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  int cfg_edges [NCFG];
  int cfg_searches [NCFG];
  int cfg_hits [NCFG];
  int cfg_buc [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int SW = g + 1;
    localparam int NB = 1 << SW;
    localparam int BD = TOTAL / NB;
    logic upd_done, upd_ok, upd_to_buc, res_valid, res_hit, del_done;
    logic [AW-1:0] upd_addr, res_addr;
    logic [BD+UD-1:0] res_mls;

    rpe_tcam #(.KEY_W(KW), .SEL_W(SW), .BANK_DEPTH(BD), .BUC_DEPTH(UD)) dut (
      .clk, .rst_n, .srch_valid, .srch_key, .upd_valid, .upd_key, .upd_care,
      .del_valid(1'b0), .del_addr('0), .del_done,
      .upd_done, .upd_ok, .upd_addr, .upd_to_buc,
      .res_valid, .res_hit, .res_addr, .res_mls);

    // model: what this instance stored where
    logic [KW-1:0] m_val [2**AW], m_care [2**AW];
    logic          m_vld [2**AW];
    logic [KW-1:0] pend_key [$];
    logic [KW-1:0] upd_key_d, upd_care_d;

    initial for (int a = 0; a < 2**AW; a++) m_vld[a] = 0;

    always @(posedge clk) begin
      upd_key_d  <= upd_key;
      upd_care_d <= upd_care;
      if (srch_valid && !upd_valid) pend_key.push_back(srch_key);
    end

    for (genvar b = 0; b < NB; b++) begin : g_mon
      always @(posedge dut.g_bank[b].gclk) if (in_search_phase) cfg_edges[g]++;
    end

    always @(negedge clk) begin
      if (upd_done) begin
        chk(upd_ok, "store accepted");
        if (upd_ok) begin
          chk(!m_vld[upd_addr], "store address unused");
          if (!upd_to_buc)
            chk(int'(upd_addr) / BD == int'(upd_key_d[SW-1:0]), "stored in the selector's bank");
          else cfg_buc[g]++;
          m_val[upd_addr] = upd_key_d & upd_care_d;
          m_care[upd_addr] = upd_care_d;
          m_vld[upd_addr] = 1;
        end
      end
      if (res_valid) begin
        automatic logic [KW-1:0] k = pend_key.pop_front();
        automatic bit any = 0;
        for (int a = 0; a < 2**AW; a++)
          if (m_vld[a] && ((k ^ m_val[a]) & m_care[a]) == 0) any = 1;
        chk(res_hit == any, $sformatf("B=%0d hit", NB));
        if (res_hit)
          chk(m_vld[res_addr] && ((k ^ m_val[res_addr]) & m_care[res_addr]) == 0,
              $sformatf("B=%0d returned address holds a matching word", NB));
        cfg_searches[g]++;
        if (res_hit) cfg_hits[g]++;
      end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NCFG; c++) begin
      cfg_edges[c] = 0; cfg_searches[c] = 0; cfg_hits[c] = 0; cfg_buc[c] = 0;
    end
    #1 rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NSTORE; i++) begin
      st_care[i] = KW'($urandom) | KW'($urandom) | 16'h0007;   // selector bits always cared
      st_val[i]  = KW'($urandom) & st_care[i];
      upd_valid = 1; upd_key = st_val[i]; upd_care = st_care[i];
      @(negedge clk);
    end
    upd_valid = 0;
    @(negedge clk);
    in_search_phase = 1;
    for (int t = 0; t < NSRCH; t++) begin
      srch_valid = 1;
      srch_key = KW'($urandom);
      if ($urandom_range(0, 2) != 0) begin
        automatic int j = $urandom_range(0, NSTORE - 1);
        srch_key = st_val[j] | (srch_key & ~st_care[j]);
      end
      @(negedge clk);
    end
    srch_valid = 0;
    repeat (3) @(negedge clk);
    in_search_phase = 0;
    for (int c = 0; c < NCFG; c++) begin
      automatic int nb = 2 << c;
      chk(cfg_searches[c] == NSRCH, "every search answered");
      chk(cfg_edges[c] == NSRCH, $sformatf("B=%0d: one bank clock edge per search", nb));
      $display("B=%0d banks of %0d: %0d searches, %0d hits, %0d words in backup CAM, bank clock edges %0d = %0d%% of an ungated table",
               nb, TOTAL / nb, cfg_searches[c], cfg_hits[c], cfg_buc[c], cfg_edges[c],
               100 * cfg_edges[c] / (nb * NSRCH));
    end
    chk(cfg_hits[0] == cfg_hits[1] && cfg_hits[1] == cfg_hits[2], "all bank counts find the same hits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
