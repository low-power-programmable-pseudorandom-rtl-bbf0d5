// pfsr_xor_op: XOR operator of the parallel-feedback shift register.
//
// Given the IN_W most recent bits of a pseudorandom sequence, y[1] oldest,
// it produces the next OUT_W bits y[IN_W+1] .. y[IN_W+OUT_W] of the sequence
// defined by the trinomial recurrence y[m] = y[m-N] ^ y[m-N+A]. When OUT_W is
// larger than N a new bit depends on bits of the same word, so the operator
// is a staircase of XOR gates in which later outputs reuse earlier ones.
//
// With RECUR set, every bit for which m-2N >= 1 uses the substituted form
// y[m] = y[m-2N] ^ y[m-2N+2A], which follows from applying the recurrence to
// itself. For N = 7, A = 1 and 16 stored bits this cuts the longest chain to
// two XOR gates (the first twelve outputs come straight from stored bits, the
// last six need one of those twelve).
//
// Interface: y_in[i-1] is y[i]; y_out[j] is y[IN_W+1+j]. Purely combinational.
// The recurrence and the substitution follow the design description; the
// bit-vector packing is this implementation's choice.
module pfsr_xor_op #(
  parameter int N      = 7,
  parameter int A      = 1,
  parameter bit RECUR  = 1'b1,
  parameter int IN_W   = 16,
  parameter int OUT_W  = 18
) (
  input  logic [IN_W-1:0]  y_in,
  output logic [OUT_W-1:0] y_out
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int TOT = IN_W + OUT_W;

  initial begin
    assert (A > 0 && A < N) else $error("pfsr_xor_op: tap A must lie in 1..N-1");
    assert (N <= IN_W) else $error("pfsr_xor_op: degree N exceeds stored bits");
  end

  logic [TOT-1:0] seq;  // seq[i-1] is y[i]

  always_comb begin
    seq = '0;
    seq[IN_W-1:0] = y_in;
    for (int m = IN_W + 1; m <= TOT; m++) begin
      if (RECUR && (m - 2*N >= 1))
        seq[m-1] = seq[m-2*N-1] ^ seq[m-2*N+2*A-1];
      else
        seq[m-1] = seq[m-N-1] ^ seq[m-N+A-1];
    end
  end

  assign y_out = seq[TOT-1:IN_W];
endmodule
