// payload_monitor_top: payload monitor built around a bank-selected TCAM.
//
// Payload bytes stream in one per cycle. The last WIN_CHARS bytes form the
// search key of the TCAM (rpe_tcam), which holds fixed-length sub-patterns with
// don't-care bytes. The TCAM's answer is a sub-pattern index; the two-stage
// sequential engine (subpattern_seq_engine) checks that a pattern's quotient
// and remnant indices arrive the right number of bytes apart and reports the
// whole pattern. How the blocks are joined is this design's reading of the
// document, which describes the TCAM and the divided-pattern matcher but shows
// no top-level diagram.
//
// Interface:
//   byte_valid/byte_in/byte_ready  payload stream; byte_ready is low in a
//                                  cycle that carries a TCAM update or delete
//   upd_*                          store one ternary sub-pattern; the answer
//                                  (upd_done, upd_ok, upd_addr = its index,
//                                  upd_to_buc) comes one cycle later
//   del_valid/del_addr/del_done    remove the sub-pattern at one index; the
//                                  slot is free again one cycle later
//   cfg_*                          load one pattern slot of the engine
//   tcam_hit/tcam_addr/tcam_mls    raw TCAM result, 2 cycles after the byte;
//                                  tcam_mls are the match lines of the
//                                  searched bank (low) and the backup CAM
//   pat_match/match_count          whole-pattern pulses, 3 cycles after the
//                                  pattern's last byte, and their total
module payload_monitor_top
  import tcam_pkg::*;
#(
  parameter int unsigned WIN_CHARS    = 6,
  parameter int unsigned SEL_W        = 2,
  parameter int unsigned BANK_DEPTH   = 16,
  parameter int unsigned BUC_DEPTH    = 8,
  parameter int unsigned NUM_PATTERNS = 8,
  localparam int unsigned KEY_W  = CHAR_W * WIN_CHARS,
  localparam int unsigned ADDR_W = $clog2((1 << SEL_W) * BANK_DEPTH + BUC_DEPTH),
  localparam int unsigned LEN_W  = $clog2(WIN_CHARS + 1),
  localparam int unsigned SLOT_W = (NUM_PATTERNS > 1) ? $clog2(NUM_PATTERNS) : 1,
  localparam int unsigned NML    = BANK_DEPTH + BUC_DEPTH
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    byte_valid,
  input  logic [CHAR_W-1:0]       byte_in,
  output logic                    byte_ready,
  input  logic                    upd_valid,
  input  logic [KEY_W-1:0]        upd_key,
  input  logic [KEY_W-1:0]        upd_care,
  output logic                    upd_done,
  output logic                    upd_ok,
  output logic [ADDR_W-1:0]       upd_addr,
  output logic                    upd_to_buc,
  input  logic                    del_valid,
  input  logic [ADDR_W-1:0]       del_addr,
  output logic                    del_done,
  input  logic                    cfg_valid,
  input  logic [SLOT_W-1:0]       cfg_slot,
  input  logic                    cfg_enable,
  input  logic [ADDR_W-1:0]       cfg_q_idx,
  input  logic [ADDR_W-1:0]       cfg_r_idx,
  input  logic [LEN_W-1:0]        cfg_r_len,
  output logic                    tcam_hit,
  output logic [ADDR_W-1:0]       tcam_addr,
  output logic [NML-1:0]          tcam_mls,
  output logic [NUM_PATTERNS-1:0] pat_match,
  output logic [15:0]             match_count
);

  logic             take;
  logic [KEY_W-1:0] window, win_next;
  logic             win_valid;
  logic             res_valid;

  assign byte_ready = !upd_valid && !del_valid;
  assign take       = byte_valid && byte_ready;

  payload_window #(.WIN_CHARS(WIN_CHARS)) u_win (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (take),
    .in_byte   (byte_in),
    .window    (window),
    .win_next  (win_next),
    .win_valid (win_valid)
  );

  rpe_tcam #(
    .KEY_W      (KEY_W),
    .SEL_W      (SEL_W),
    .BANK_DEPTH (BANK_DEPTH),
    .BUC_DEPTH  (BUC_DEPTH)
  ) u_tcam (
    .clk        (clk),
    .rst_n      (rst_n),
    .srch_valid (take),
    .srch_key   (win_next),
    .upd_valid  (upd_valid),
    .upd_key    (upd_key),
    .upd_care   (upd_care),
    .del_valid  (del_valid),
    .del_addr   (del_addr),
    .del_done   (del_done),
    .upd_done   (upd_done),
    .upd_ok     (upd_ok),
    .upd_addr   (upd_addr),
    .upd_to_buc (upd_to_buc),
    .res_valid  (res_valid),
    .res_hit    (tcam_hit),
    .res_addr   (tcam_addr),
    .res_mls    (tcam_mls)
  );

  subpattern_seq_engine #(
    .NUM_PATTERNS (NUM_PATTERNS),
    .ADDR_W       (ADDR_W),
    .WIN_CHARS    (WIN_CHARS)
  ) u_seq (
    .clk         (clk),
    .rst_n       (rst_n),
    .cfg_valid   (cfg_valid),
    .cfg_slot    (cfg_slot),
    .cfg_enable  (cfg_enable),
    .cfg_q_idx   (cfg_q_idx),
    .cfg_r_idx   (cfg_r_idx),
    .cfg_r_len   (cfg_r_len),
    .in_valid    (res_valid),
    .in_hit      (tcam_hit),
    .in_idx      (tcam_addr),
    .pat_match   (pat_match),
    .match_count (match_count)
  );

endmodule
