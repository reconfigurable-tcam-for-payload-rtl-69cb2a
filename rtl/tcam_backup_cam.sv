// tcam_backup_cam: backup CAM (BUC) for entries that overflow their bank.
//
// A small ternary CAM of DEPTH full-width words (selector bits included, since
// an overflowed word may come from any bank). It is searched together with
// whichever bank the selector picks, so a word stored here is always found.
// Like a bank it runs on a gated clock: an edge with wr high stores the word in
// the lowest free slot (wr_slot), an edge with clr high invalidates slot
// clr_slot, and any other edge captures the search key. Its match
// lines are computed combinationally from the captured key, so they line up
// with the bank comparator's. The document names the BUC and its purpose; its
// size, organisation and timing are this design's.
module tcam_backup_cam #(
  parameter int unsigned KEY_W = 48,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned SLOT_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              gclk,
  input  logic              rst_n,
  input  logic              wr,
  input  logic              clr,
  input  logic [SLOT_W-1:0] clr_slot,
  input  logic [KEY_W-1:0]  wr_key,
  input  logic [KEY_W-1:0]  wr_care,
  input  logic [KEY_W-1:0]  srch_key,
  output logic [DEPTH-1:0]  ml,
  output logic              full,
  output logic [SLOT_W-1:0] wr_slot
);

  logic [DEPTH*KEY_W-1:0]     ent_data;
  logic [DEPTH*KEY_W-1:0]     ent_care;
  logic [DEPTH-1:0]           ent_valid;
  logic [KEY_W-1:0]           key_q;

  tcam_bank #(.DATA_W(KEY_W), .DEPTH(DEPTH)) u_store (
    .gclk      (gclk),
    .rst_n     (rst_n),
    .wr        (wr),
    .clr       (clr),
    .clr_slot  (clr_slot),
    .wr_data   (wr_key),
    .wr_care   (wr_care),
    .srch_data (srch_key),
    .ent_data  (ent_data),
    .ent_care  (ent_care),
    .ent_valid (ent_valid),
    .key_q     (key_q),
    .free_slot (wr_slot),
    .full      (full)
  );

  tcam_compare #(.DATA_W(KEY_W), .DEPTH(DEPTH)) u_cmp (
    .key       (key_q),
    .ent_data  (ent_data),
    .ent_care  (ent_care),
    .ent_valid (ent_valid),
    .ml        (ml)
  );

endmodule
