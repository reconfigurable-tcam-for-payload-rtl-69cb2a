// tcam_preclass: stage 1 of the TCAM, pre-classification.
//
// The n selector bits are decoded (n : 2^n) into a one-hot bank enable, so
// that only one bank is clocked for a search, a store or a delete. For a store
// this stage also decides where the word goes: into the selected bank when it
// has room, otherwise into the backup CAM (BUC). A word whose selector bits
// are not all "care" bits belongs to no single bank and goes to the BUC as
// well. If the chosen place is full, upd_fail is raised and nothing is written.
// For a delete, sel carries the bank number of the address (or del_buc says
// the address is in the BUC) and the matching clear strobe is raised. The
// decoder follows the document; the overflow routing and the delete are this
// design's choice.
//
// Purely combinational; the outputs are used in the same cycle by the clock
// gates (bank_en) and the write ports. The operations are exclusive: the
// caller raises at most one of op_update, op_delete and op_search.
module tcam_preclass #(
  parameter int unsigned SEL_W = 2,
  localparam int unsigned NB = 1 << SEL_W
) (
  input  logic             op_search,
  input  logic             op_update,
  input  logic             op_delete,
  input  logic [SEL_W-1:0] sel,
  input  logic [SEL_W-1:0] sel_care,
  input  logic             del_buc,
  input  logic [NB-1:0]    bank_full,
  input  logic             buc_full,
  output logic [NB-1:0]    bank_en,
  output logic [NB-1:0]    bank_wr,
  output logic [NB-1:0]    bank_clr,
  output logic             buc_wr,
  output logic             buc_clr,
  output logic             upd_fail
);

  logic [NB-1:0] dec;
  logic          sel_exact;
  logic          to_bank;

  always_comb begin
    dec = '0;
    dec[sel] = 1'b1;
  end

  assign sel_exact = &sel_care;
  assign to_bank   = op_update && sel_exact && !bank_full[sel];

  always_comb begin
    bank_wr  = to_bank ? dec : '0;
    buc_wr   = op_update && !to_bank && !buc_full;
    upd_fail = op_update && !to_bank && buc_full;
    bank_clr = (op_delete && !del_buc) ? dec : '0;
    buc_clr  = op_delete && del_buc;
    if (op_update)      bank_en = bank_wr;
    else if (op_delete) bank_en = bank_clr;
    else if (op_search) bank_en = dec;
    else                bank_en = '0;
  end

endmodule
