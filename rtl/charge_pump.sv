// charge_pump: behavioural model of the differential current-mode charge
// pump. Not synthesizable logic: the real block is analog.
//
// The pumping current is steered by two differential pairs driven by UP and
// DOWN. With only UP high, +I flows into the Vc+ side of the loop filter
// (and out of Vc-); with only DOWN high, the current is reversed; with both
// high or both low the pump holds and no current flows. The common-mode
// feedback of the real circuit, which sets the output common mode, is
// represented by the fixed common mode of loop_filter.
//
// Interface: up, dn (from the phase detector), i_diff (real, amperes,
// positive = charging Vc+ - Vc-). Zero delay.
//
// The hold states and the equal up/down current follow the design; the
// current I = 100 uA is an assumed value (the design gives none).
module charge_pump #(
  parameter real I_PUMP = 100.0e-6
) (
  input  logic up,
  input  logic dn,
  output real  i_diff
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    if (up && !dn)      i_diff = I_PUMP;
    else if (dn && !up) i_diff = -I_PUMP;
    else                i_diff = 0.0;
  end
endmodule
