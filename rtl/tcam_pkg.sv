// tcam_pkg: types and constants shared by the bank-selected TCAM and the
// payload matcher.
//
// A ternary word is a value plus a care mask: a bit whose care bit is 0 is a
// "don't care" and matches either key value. seq_state_t names the three
// states of the two-stage sub-pattern engine (s0 idle, s1 quotient seen,
// s2 pattern found).
package tcam_pkg;

  localparam int unsigned CHAR_W = 8;

  typedef enum logic [1:0] {
    S0_IDLE  = 2'd0,
    S1_QSEEN = 2'd1,
    S2_MATCH = 2'd2
  } seq_state_t;

endpackage
