// prwg_pkg: shared types and constants of the pseudorandom word generator.
//
// The generator supports the five CCITT/ITU-T pattern lengths 2^n-1 with
// n = 7, 10, 15, 23 and 31. Every pattern is a trinomial x^n + x^(n-a) + 1,
// written here as the bit recurrence y[m] = y[m-n] ^ y[m-n+a], where y[1] is
// the oldest bit. The taps a = 5 (n = 23) and a = 3 (n = 31) are the ones
// the design's two-stage feedback uses; a = 1, 3, 1 for n = 7, 10, 15 are the
// standard ITU-T O.150/O.152 polynomials.
//
// The mark density select is the pair (S1, S2) of the mark density controller:
// S1 is bit 1 and S2 is bit 0 of md_sel_e.
package prwg_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int NPAT = 5;

  // Pattern-length select, in the order the generator's operators are numbered.
  typedef enum logic [2:0] {
    PAT_7  = 3'd0,
    PAT_10 = 3'd1,
    PAT_15 = 3'd2,
    PAT_23 = 3'd3,
    PAT_31 = 3'd4
  } pattern_e;

  // Degree n and tap offset a of each pattern: y[m] = y[m-n] ^ y[m-n+a].
  localparam int PAT_DEG [NPAT] = '{7, 10, 15, 23, 31};
  localparam int PAT_TAP [NPAT] = '{1, 3, 1, 5, 3};
  // Patterns whose operator uses the recursive substitution
  // y[m] = y[m-2n] ^ y[m-2n+2a] (bit i is pattern i).
  localparam logic [NPAT-1:0] PAT_RECUR = 5'b00001;

  // Mark density select {S1, S2}.
  typedef enum logic [1:0] {
    MD_1_8    = 2'b00,  // y[n] & y[n+1] & y[n+2]
    MD_1_4    = 2'b01,  // y[n] & y[n+1]
    MD_1_4_SK = 2'b10,  // y[n] & y[n+2]
    MD_1_2    = 2'b11   // y[n]
  } md_sel_e;
endpackage
