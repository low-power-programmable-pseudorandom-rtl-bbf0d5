// vco: behavioural model of the four-stage differential ring oscillator.
// Not synthesizable logic: the real block is an analog ring of delay cells.
//
// Four differential delay cells in a ring with one crossed connection give
// eight output nodes whose waveforms are spaced by one eighth of a period
// (45 degrees). The model advances a phase counter every eighth of the
// current period; output k is high while (count - k) mod 8 < 4, so phase[k]
// lags phase[0] by k*45 degrees. Frequency follows the differential control
// voltage: f = F_FREE + KVCO * (vcp - vcn), limited to [F_MIN, F_MAX]. The
// real cell sets F_FREE with its bias current (coarse tuning) and moves
// around it with the control voltage (fine tuning); the model has one linear
// gain.
//
// Interface: vcp, vcn (real, V), phase[7:0]. phase[k] is the design's output
// node k+1, numbered in the order the ring produces them.
//
// The ring of four cells, the eight phases and the 1.25 GHz operating point
// follow the design; F_FREE, KVCO and the limits are assumed values.
module vco #(
  parameter real F_FREE = 1.10e9,
  parameter real KVCO   = 1.0e9,
  parameter real F_MIN  = 0.5e9,
  parameter real F_MAX  = 2.0e9
) (
  input  real        vcp,
  input  real        vcn,
  output logic [7:0] phase
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [2:0] count;
  real        freq;

  always_comb begin
    for (int k = 0; k < 8; k++)
      phase[k] = ((count - 3'(k)) < 3'd4);
  end

  initial count = 3'd0;

  // One eighth of the current period per step.
  always begin
    freq = F_FREE + KVCO * (vcp - vcn);
    if (freq < F_MIN) freq = F_MIN;
    if (freq > F_MAX) freq = F_MAX;
    #(1.0e12 / freq / 8.0);
    count = count + 3'd1;
  end
endmodule
