// rpe_tcam: reconfigurable power-efficient TCAM with bank selection.
//
// The key's n least significant bits (the selector) pick one of 2^n banks, and
// only that bank is clocked for a search or a store; the other banks stay
// still, which is where the power is saved. The five stages are: (1) a
// decoder on the selector, (2) a clock gate per bank, (3a) the banks of
// flip-flop storage, (3b) a multiplexer passing the selected bank on, (4) one
// ternary comparator for the remaining KEY_W-n bits and (5) a priority
// encoder. A word that finds its bank full, or whose selector bits contain
// don't-cares, is stored in a backup CAM (BUC) searched with every search.
// The stage structure and the BUC follow the document; sizes, priority and
// address map are this design's.
//
// FILTER_MUX selects between the two arrangements of stages 3b and 4: with
// the multiplexer (default) one bank-sized comparator serves all banks;
// without it every bank has its own comparator and the selected bank's match
// lines are kept. Both give the same results. In either case the key's
// KEY_W-n bits reach the comparator through the selected bank's key register
// rather than on a path of their own, so nothing on the search path of an
// unselected bank toggles.
//
// Address map: bank b slot s -> b*BANK_DEPTH+s; BUC slot s ->
// 2^n*BANK_DEPTH+s. Priority: lowest matching address of the searched bank,
// then the BUC. A slot freed by a delete is reused by the next store into
// that bank, so priority follows slot order, not store order.
//
// Interface and timing: one operation per cycle, priority update, then
// delete, then search. upd_valid stores (upd_key, upd_care) in the lowest
// free slot of its bank (or of the BUC); the answer (upd_done, upd_ok,
// upd_addr, upd_to_buc) appears on the next cycle. del_valid invalidates the
// word at del_addr, which frees its slot for a later store; del_done follows
// one cycle later (an address beyond the table is ignored). A search issued in
// cycle t gives res_valid/res_hit/res_addr/res_mls in cycle t+2; a search may
// be issued every cycle. The cycle after an update, a search sees the new
// word.
module rpe_tcam #(
  parameter int unsigned KEY_W      = 48,
  parameter int unsigned SEL_W      = 2,
  parameter int unsigned BANK_DEPTH = 16,
  parameter int unsigned BUC_DEPTH  = 8,
  parameter bit          FILTER_MUX = 1'b1,
  localparam int unsigned NB     = 1 << SEL_W,
  localparam int unsigned DW     = KEY_W - SEL_W,
  localparam int unsigned NML    = BANK_DEPTH + BUC_DEPTH,
  localparam int unsigned ADDR_W = $clog2(NB * BANK_DEPTH + BUC_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              srch_valid,
  input  logic [KEY_W-1:0]  srch_key,
  input  logic              upd_valid,
  input  logic [KEY_W-1:0]  upd_key,
  input  logic [KEY_W-1:0]  upd_care,
  input  logic              del_valid,
  input  logic [ADDR_W-1:0] del_addr,
  output logic              del_done,
  output logic              upd_done,
  output logic              upd_ok,
  output logic [ADDR_W-1:0] upd_addr,
  output logic              upd_to_buc,
  output logic              res_valid,
  output logic              res_hit,
  output logic [ADDR_W-1:0] res_addr,
  output logic [NML-1:0]    res_mls
);

  localparam int unsigned BW    = 2 * BANK_DEPTH * DW + BANK_DEPTH + DW;
  localparam int unsigned BSW   = $clog2(BANK_DEPTH);
  localparam int unsigned BUCSW = (BUC_DEPTH > 1) ? $clog2(BUC_DEPTH) : 1;
  localparam int unsigned PEW   = $clog2(NML);

  // ---- stage 1: pre-classification ----
  logic             op_update, op_delete, op_search;
  logic [SEL_W-1:0] sel, del_bank;
  logic             del_buc, del_in_range;
  logic [BUCSW-1:0] del_buc_slot;
  logic [NB-1:0]    bank_en, bank_wr, bank_clr, bank_full;
  logic             buc_wr, buc_clr, buc_full, upd_fail;

  assign op_update    = upd_valid;
  assign op_delete    = del_valid && !upd_valid;
  assign op_search    = srch_valid && !upd_valid && !del_valid;
  assign del_in_range = 32'(del_addr) < NB * BANK_DEPTH + BUC_DEPTH;
  assign del_buc      = 32'(del_addr) >= NB * BANK_DEPTH;
  assign del_bank     = SEL_W'(32'(del_addr) / BANK_DEPTH);
  assign del_buc_slot = BUCSW'(32'(del_addr) - NB * BANK_DEPTH);
  assign sel          = op_update ? upd_key[SEL_W-1:0] :
                        op_delete ? del_bank : srch_key[SEL_W-1:0];

  tcam_preclass #(.SEL_W(SEL_W)) u_pre (
    .op_search (op_search),
    .op_update (op_update),
    .op_delete (op_delete && del_in_range),
    .sel       (sel),
    .sel_care  (upd_care[SEL_W-1:0]),
    .del_buc   (del_buc),
    .bank_full (bank_full),
    .buc_full  (buc_full),
    .bank_en   (bank_en),
    .bank_wr   (bank_wr),
    .bank_clr  (bank_clr),
    .buc_wr    (buc_wr),
    .buc_clr   (buc_clr),
    .upd_fail  (upd_fail)
  );

  // ---- stages 2 and 3a: clock gates and banks ----
  logic [NB*BW-1:0]     bank_bus;
  logic [BSW-1:0]       bank_free [NB];

  for (genvar b = 0; b < NB; b++) begin : g_bank
    logic                       gclk;
    logic [BANK_DEPTH*DW-1:0]   ent_data, ent_care;
    logic [BANK_DEPTH-1:0]      ent_valid;
    logic [DW-1:0]              key_q;

    tcam_clock_gate u_cg (.clk(clk), .en(bank_en[b]), .gclk(gclk));

    tcam_bank #(.DATA_W(DW), .DEPTH(BANK_DEPTH)) u_bank (
      .gclk      (gclk),
      .rst_n     (rst_n),
      .wr        (bank_wr[b]),
      .clr       (bank_clr[b]),
      .clr_slot  (del_addr[BSW-1:0]),
      .wr_data   (upd_key[KEY_W-1:SEL_W]),
      .wr_care   (upd_care[KEY_W-1:SEL_W]),
      .srch_data (srch_key[KEY_W-1:SEL_W]),
      .ent_data  (ent_data),
      .ent_care  (ent_care),
      .ent_valid (ent_valid),
      .key_q     (key_q),
      .free_slot (bank_free[b]),
      .full      (bank_full[b])
    );

    assign bank_bus[b*BW +: BW] = {key_q, ent_valid, ent_care, ent_data};
  end

  // ---- backup CAM, clocked on its own writes and on every search ----
  logic                 buc_gclk;
  logic [BUC_DEPTH-1:0] buc_ml;
  logic [BUCSW-1:0]     buc_slot;

  tcam_clock_gate u_buc_cg (.clk(clk), .en(buc_wr || buc_clr || op_search), .gclk(buc_gclk));

  tcam_backup_cam #(.KEY_W(KEY_W), .DEPTH(BUC_DEPTH)) u_buc (
    .gclk     (buc_gclk),
    .rst_n    (rst_n),
    .wr       (buc_wr),
    .clr      (buc_clr),
    .clr_slot (del_buc_slot),
    .wr_key   (upd_key),
    .wr_care  (upd_care),
    .srch_key (srch_key),
    .ml       (buc_ml),
    .full     (buc_full),
    .wr_slot  (buc_slot)
  );

  // ---- pipeline register alongside the banks (free-running clock) ----
  logic             s1_valid;
  logic [SEL_W-1:0] s1_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid   <= 1'b0;
      s1_sel     <= '0;
      upd_done   <= 1'b0;
      upd_ok     <= 1'b0;
      upd_addr   <= '0;
      upd_to_buc <= 1'b0;
      del_done   <= 1'b0;
    end else begin
      del_done   <= op_delete;
      s1_valid   <= op_search;
      s1_sel     <= sel;
      upd_done   <= op_update;
      upd_ok     <= op_update && !upd_fail;
      upd_to_buc <= buc_wr;
      if (buc_wr)
        upd_addr <= ADDR_W'(NB * BANK_DEPTH) + ADDR_W'(buc_slot);
      else
        upd_addr <= ADDR_W'({sel, bank_free[sel]});
    end
  end

  // ---- stages 3b and 4: filtering multiplexer and comparison ----
  logic [BANK_DEPTH-1:0] bank_ml;

  if (FILTER_MUX) begin : g_filter
    // one comparator, fed by the selected bank only
    logic [BW-1:0]            sel_bus;
    logic [BANK_DEPTH*DW-1:0] m_data, m_care;
    logic [BANK_DEPTH-1:0]    m_valid;
    logic [DW-1:0]            m_key;

    tcam_filter_mux #(.NB(NB), .W(BW)) u_mux (
      .sel  (s1_sel),
      .din  (bank_bus),
      .dout (sel_bus)
    );

    assign {m_key, m_valid, m_care, m_data} = sel_bus;

    tcam_compare #(.DATA_W(DW), .DEPTH(BANK_DEPTH)) u_cmp (
      .key       (m_key),
      .ent_data  (m_data),
      .ent_care  (m_care),
      .ent_valid (m_valid),
      .ml        (bank_ml)
    );
  end else begin : g_nofilter
    // a comparator per bank; the selected bank's match lines are kept
    logic [NB*BANK_DEPTH-1:0] all_ml;

    for (genvar b = 0; b < NB; b++) begin : g_cmp
      logic [BANK_DEPTH*DW-1:0] b_data, b_care;
      logic [BANK_DEPTH-1:0]    b_valid;
      logic [DW-1:0]            b_key;

      assign {b_key, b_valid, b_care, b_data} = bank_bus[b*BW +: BW];

      tcam_compare #(.DATA_W(DW), .DEPTH(BANK_DEPTH)) u_cmp (
        .key       (b_key),
        .ent_data  (b_data),
        .ent_care  (b_care),
        .ent_valid (b_valid),
        .ml        (all_ml[b*BANK_DEPTH +: BANK_DEPTH])
      );
    end

    assign bank_ml = all_ml[s1_sel*BANK_DEPTH +: BANK_DEPTH];
  end

  // ---- stage 5: priority encoding ----
  logic [NML-1:0] mls;
  logic           pe_hit;
  logic [PEW-1:0] pe_addr;
  logic [ADDR_W-1:0] g_addr;

  assign mls = {buc_ml, bank_ml};

  tcam_priority_encoder #(.N(NML)) u_pe (
    .ml   (mls),
    .hit  (pe_hit),
    .addr (pe_addr)
  );

  always_comb begin
    if (32'(pe_addr) < BANK_DEPTH)
      g_addr = ADDR_W'({s1_sel, pe_addr[BSW-1:0]});
    else
      g_addr = ADDR_W'(NB * BANK_DEPTH) + ADDR_W'(32'(pe_addr) - BANK_DEPTH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_hit   <= 1'b0;
      res_addr  <= '0;
      res_mls   <= '0;
    end else begin
      res_valid <= s1_valid;
      res_hit   <= s1_valid && pe_hit;
      res_addr  <= s1_valid ? g_addr : '0;
      res_mls   <= s1_valid ? mls : '0;
    end
  end

endmodule
