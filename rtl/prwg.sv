// prwg: programmable pseudorandom word generator (parallel-feedback shift
// register).
//
// Each clock the generator advances a pseudorandom bit sequence by M bits
// and presents them as one word, so an M:1 serializer behind it sends a
// plain PRBS while the logic runs at 1/M of the bit rate. The state is a
// register array of NROWS rows of M+K-1 flip-flops. Row 0 holds y[1..M+K-1]
// (the word on the output, plus K-1 bits of the next word that the mark
// density controller needs), row 1 holds y[M+1..2M+K-1], and so on.
//
// A pattern of degree n needs s = ceil(n/M) rows. Its XOR operator reads the
// s*M bits y[1..s*M] and computes the following M+K-1 bits; that result is
// loaded into row s-1 while every row below it takes the row above it (the
// rows form a FIFO of past words). With the default sizes the short patterns
// (n = 7, 10, 15) run in row 0 alone, selected by the row-0 multiplexer, and
// the long ones (n = 23, 31) use both rows, selected by the row-1
// multiplexer; row 0 then loads row 1.
//
// Reset must not leave the generator in the all-zero state. A single preset
// one is enough for an operator that applies the plain recurrence, but not
// for one with recursive substitution: y[m] = y[m-2n] ^ y[m-2n+2a] links
// only bits of equal parity, so from a single one the odd and even bits
// would run as two unrelated sequences. Reset therefore loads row 0 with a
// valid window of the first recursive pattern's sequence (y[1..n-1] = 0,
// y[n] = 1, later bits by the recurrence); with no recursive pattern it
// loads a single one into y[M]. Both seeds have a one among the bits every
// default pattern reads. A change of pat_sel takes effect at the next
// clock; for the plain patterns the first words after a change are a
// transient, for a recursive pattern the generator must be reset after the
// change.
//
// Interface: clk, asynchronous active-low rst_n, pat_sel (prwg_pkg::pattern_e
// index), y_word (row 0: y_word[0] is the oldest bit, bits M..M+K-2 are the
// next word's first bits). One word per clock, the new word appears after
// the rising edge that follows the select.
//
// Follows the design: sizes (16-bit word, two extension bits, two rows),
// the five polynomials, the row-FIFO feedback and the recursive substitution
// for n = 7. Own choices: the reset seed (the design presets one flip-flop),
// holding rows above the active stage, and the async reset.
module prwg
  import prwg_pkg::*;
#(
  parameter int              M        = 16,
  parameter int              K        = 3,
  parameter int              NP       = NPAT,
  parameter int              DEG [NP] = PAT_DEG,
  parameter int              TAP [NP] = PAT_TAP,
  parameter logic [NP-1:0]   RECUR    = PAT_RECUR
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [2:0]      pat_sel,
  output logic [M+K-2:0]  y_word
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int W = M + K - 1;

  function automatic int stages(int n);
    return (n + M - 1) / M;
  endfunction

  function automatic int max_stages();
    int s = 1;
    for (int p = 0; p < NP; p++)
      if (stages(DEG[p]) > s) s = stages(DEG[p]);
    return s;
  endfunction

  // Reset contents of row 0 (bit i-1 is y[i]).
  function automatic logic [W-1:0] seed_word();
    logic [W-1:0] v;
    int p = -1;
    for (int q = NP - 1; q >= 0; q--)
      if (RECUR[q]) p = q;
    v = '0;
    if (p < 0) begin
      v[M-1] = 1'b1;
    end else begin
      v[DEG[p]-1] = 1'b1;
      for (int m = DEG[p] + 1; m <= W; m++)
        v[m-1] = v[m-DEG[p]-1] ^ v[m-DEG[p]+TAP[p]-1];
    end
    return v;
  endfunction

  localparam int           NROWS = max_stages();
  localparam int           HIST  = NROWS * M;
  localparam logic [W-1:0] SEED  = seed_word();

  logic [W-1:0] row      [NROWS];
  logic [W-1:0] row_next [NROWS];
  logic [W-1:0] op_out   [NP];
  logic [HIST-1:0] hist;   // hist[i-1] is y[i]

  // Sequence history seen by the operators: row r contributes y[r*M+1 .. r*M+M].
  always_comb begin
    for (int r = 0; r < NROWS; r++)
      hist[r*M +: M] = row[r][M-1:0];
  end

  for (genvar p = 0; p < NP; p++) begin : g_op
    localparam int S = (DEG[p] + M - 1) / M;
    pfsr_xor_op #(
      .N(DEG[p]), .A(TAP[p]), .RECUR(RECUR[p]), .IN_W(S*M), .OUT_W(W)
    ) u_op (
      .y_in (hist[S*M-1:0]),
      .y_out(op_out[p])
    );
  end

  // Row multiplexers: the active pattern's stage row loads its operator,
  // rows below shift down, rows above hold. An out-of-range select acts as
  // pattern 0.
  logic [2:0] sel;
  assign sel = (int'(pat_sel) < NP) ? pat_sel : 3'd0;

  always_comb begin
    for (int r = 0; r < NROWS; r++) row_next[r] = row[r];
    for (int p = 0; p < NP; p++) begin
      if (int'(sel) == p) begin
        for (int r = 0; r < NROWS; r++) begin
          if (r == stages(DEG[p]) - 1)
            row_next[r] = op_out[p];
          else if (r < stages(DEG[p]) - 1)
            row_next[r] = row[r+1];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 1; r < NROWS; r++) row[r] <= '0;
      row[0] <= SEED;
    end else begin
      for (int r = 0; r < NROWS; r++) row[r] <= row_next[r];
    end
  end

  assign y_word = row[0];
endmodule
