// subpattern_seq_engine: two-stage sequential matcher for divided patterns.
//
// A pattern longer than the window is split into a quotient Q (the first
// WIN_CHARS characters) and a remnant R (the last r_len characters, stored in
// the TCAM with don't-care bytes in front). Each is one TCAM entry, and the
// TCAM reports its address as the sub-pattern index. The pattern occurred when
// Q's index arrives and, exactly r_len bytes later, R's index arrives. A
// pattern that fits the window is a lone Q with r_len = 0.
//
// Each of the NUM_PATTERNS slots runs a three-state machine:
//   s0 idle      -> s1 on Q's index (r_len > 0) or s2 (r_len = 0)
//   s1 Q seen    counts bytes; on the r_len-th byte goes to s2 if R's index
//                arrives, restarts on Q's index, else back to s0
//   s2 found     held until the next byte, then s0 (or s1/s2 on Q's index)
// The three states and the order Q then R follow the document; the counter
// and the exact conditions are this design's. While a slot waits in s1, a new
// occurrence of Q that overlaps the pending one is not tracked.
//
// Interface: cfg_* writes one slot (and returns it to s0). in_valid/in_hit/
// in_idx carry one TCAM result per payload byte. pat_match pulses for one
// cycle, the cycle after the R (or lone Q) result, and match_count counts
// every such pulse (wrapping at 2^16).
module subpattern_seq_engine
  import tcam_pkg::*;
#(
  parameter int unsigned NUM_PATTERNS = 8,
  parameter int unsigned ADDR_W       = 7,
  parameter int unsigned WIN_CHARS    = 6,
  localparam int unsigned LEN_W  = $clog2(WIN_CHARS + 1),
  localparam int unsigned SLOT_W = (NUM_PATTERNS > 1) ? $clog2(NUM_PATTERNS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_valid,
  input  logic [SLOT_W-1:0]       cfg_slot,
  input  logic                    cfg_enable,
  input  logic [ADDR_W-1:0]       cfg_q_idx,
  input  logic [ADDR_W-1:0]       cfg_r_idx,
  input  logic [LEN_W-1:0]        cfg_r_len,
  input  logic                    in_valid,
  input  logic                    in_hit,
  input  logic [ADDR_W-1:0]       in_idx,
  output logic [NUM_PATTERNS-1:0] pat_match,
  output logic [15:0]             match_count
);

  logic [NUM_PATTERNS-1:0] slot_en;
  logic [ADDR_W-1:0]       q_idx [NUM_PATTERNS];
  logic [ADDR_W-1:0]       r_idx [NUM_PATTERNS];
  logic [LEN_W-1:0]        r_len [NUM_PATTERNS];
  seq_state_t              state [NUM_PATTERNS];
  logic [LEN_W-1:0]        cnt   [NUM_PATTERNS];

  seq_state_t              state_n [NUM_PATTERNS];
  logic [LEN_W-1:0]        cnt_n   [NUM_PATTERNS];
  logic [NUM_PATTERNS-1:0] enter_s2;
  logic [15:0]             n_found;

  always_comb begin
    n_found = '0;
    for (int p = 0; p < NUM_PATTERNS; p++) begin
      logic qhit, rhit, start_s2;
      qhit     = in_hit && (in_idx == q_idx[p]);
      rhit     = in_hit && (in_idx == r_idx[p]);
      start_s2 = (r_len[p] == '0);
      state_n[p] = state[p];
      cnt_n[p]   = cnt[p];
      if (slot_en[p] && in_valid) begin
        unique case (state[p])
          S1_QSEEN: begin
            if (cnt[p] == LEN_W'(1)) begin
              if (rhit) state_n[p] = S2_MATCH;
              else if (qhit) cnt_n[p] = r_len[p];
              else state_n[p] = S0_IDLE;
            end else begin
              cnt_n[p] = cnt[p] - 1'b1;
            end
          end
          default: begin  // S0_IDLE and S2_MATCH
            if (qhit) begin
              state_n[p] = start_s2 ? S2_MATCH : S1_QSEEN;
              cnt_n[p]   = r_len[p];
            end else begin
              state_n[p] = S0_IDLE;
            end
          end
        endcase
      end
      enter_s2[p] = slot_en[p] && in_valid && (state_n[p] == S2_MATCH);
      n_found = n_found + 16'(enter_s2[p]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_en     <= '0;
      pat_match   <= '0;
      match_count <= '0;
      for (int p = 0; p < NUM_PATTERNS; p++) begin
        q_idx[p] <= '0;
        r_idx[p] <= '0;
        r_len[p] <= '0;
        state[p] <= S0_IDLE;
        cnt[p]   <= '0;
      end
    end else begin
      pat_match   <= enter_s2;
      match_count <= match_count + n_found;
      for (int p = 0; p < NUM_PATTERNS; p++) begin
        state[p] <= state_n[p];
        cnt[p]   <= cnt_n[p];
      end
      if (cfg_valid) begin
        slot_en[cfg_slot] <= cfg_enable;
        q_idx[cfg_slot]   <= cfg_q_idx;
        r_idx[cfg_slot]   <= cfg_r_idx;
        r_len[cfg_slot]   <= cfg_r_len;
        state[cfg_slot]   <= S0_IDLE;
        cnt[cfg_slot]     <= '0;
      end
    end
  end

endmodule
