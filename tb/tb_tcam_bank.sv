// tb_tcam_bank: one flip-flop bank driven directly on its (gated) clock.
//
// Random stores, clears and searches: each store must land in the lowest free
// slot with its don't-care bits cleared, a clear must free exactly its slot,
// full and free_slot must follow, a store into a full bank must change
// nothing, and a search edge must capture the key without touching the
// stored words. The test counts that slots were reused after a clear.
module tb_tcam_bank;
  localparam int DW = 12, D = 4;
  logic gclk = 0, rst_n = 1, wr = 0, clr = 0, full;
  logic [1:0] clr_slot = 0, free_slot;
  logic [DW-1:0] wr_data = 0, wr_care = 0, srch_data = 0, key_q;
  logic [D*DW-1:0] ent_data, ent_care;
  logic [D-1:0] ent_valid;
  int checks = 0, failures = 0, n_full_wr = 0, n_reuse = 0;
  tcam_bank #(.DATA_W(DW), .DEPTH(D)) dut (.*);

  logic [DW-1:0] m_d [D], m_c [D];
  logic [D-1:0] m_v, m_ever;
  logic [DW-1:0] m_key;

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  function automatic int lowest_free();
    for (int i = 0; i < D; i++) if (!m_v[i]) return i;
    return -1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #4 rst_n = 1;
    m_v = 0; m_ever = 0; m_key = 0;
    for (int round = 0; round < 300; round++) begin
      int r;
      if (round % 60 == 0) begin
        rst_n = 0; #1 rst_n = 1;
        m_v = 0; m_ever = 0; m_key = 0;
      end
      r = $urandom_range(0, 5);
      wr = (r < 3); clr = (r == 3);
      clr_slot = 2'($urandom);
      wr_data = DW'($urandom); wr_care = DW'($urandom);
      srch_data = DW'($urandom);
      if (lowest_free() >= 0) chk(int'(free_slot) == lowest_free(), "free_slot");
      #5 gclk = 1;
      if (wr) begin
        automatic int f = lowest_free();
        if (f >= 0) begin
          if (m_ever[f]) n_reuse++;
          m_d[f] = wr_data & wr_care; m_c[f] = wr_care; m_v[f] = 1; m_ever[f] = 1;
        end else n_full_wr++;
      end else if (clr) m_v[clr_slot] = 0;
      else m_key = srch_data;
      #5 gclk = 0;
      chk(full == (m_v == '1), "full");
      chk(ent_valid == m_v, "valid");
      chk(key_q == m_key, "key_q");
      for (int i = 0; i < D; i++) if (m_v[i]) begin
        chk(ent_data[i*DW +: DW] == m_d[i], "data");
        chk(ent_care[i*DW +: DW] == m_c[i], "care");
      end
    end
    chk(n_full_wr > 0, "store into full bank exercised");
    chk(n_reuse > 0, "freed slot reused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
