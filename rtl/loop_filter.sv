// loop_filter: behavioural model of the second-order differential loop
// filter. Not synthesizable logic: the real block is passive R and C.
//
// Between the two control nodes Vc- and Vc+ sit R1, C1, R2 in series, and
// C2 directly across them. For the differential voltage vd = Vc+ - Vc- this
// is a series R = R1 + R2 and C1 in parallel with C2, driven by the charge
// pump current i:
//   C2 dvd/dt  = i - (vd - vc1)/R
//   C1 dvc1/dt = (vd - vc1)/R
// The model integrates these with forward Euler at every change of i and
// every STEP_PS picoseconds, so narrow pump pulses are counted exactly.
// Vc+ and Vc- sit symmetrically around the common mode VCM, which the pump's
// common-mode feedback holds in the real circuit.
//
// Interface: i_diff (real, A), rst_n (clears both capacitors), vcp, vcn
// (real, V). Component values are assumed (the design gives none); they set
// a loop bandwidth near the reported 10 MHz with the default pump and VCO
// gains.
module loop_filter #(
  parameter real R_SER   = 1.0e3,
  parameter real C1      = 50.0e-12,
  parameter real C2      = 5.0e-12,
  parameter real VCM     = 0.9,
  parameter real STEP_PS = 5.0
) (
  input  real  i_diff,
  input  logic rst_n,
  output real  vcp,
  output real  vcn
);
  timeunit 1ps;
  timeprecision 1fs;

  real     vd;
  real     vc1;
  real     i_prev;
  realtime t_last;

  function automatic void advance();
    real dt;
    real ir;
    dt = ($realtime - t_last) * 1.0e-12;
    ir = (vd - vc1) / R_SER;
    vd  = vd  + dt * (i_prev - ir) / C2;
    vc1 = vc1 + dt * ir / C1;
    t_last = $realtime;
  endfunction

  initial begin
    vd = 0.0;
    vc1 = 0.0;
    i_prev = 0.0;
    t_last = 0.0;
  end

  always @(i_diff or rst_n) begin
    if (!rst_n) begin
      vd = 0.0;
      vc1 = 0.0;
      t_last = $realtime;
    end else begin
      advance();
    end
    i_prev = i_diff;
  end

  always begin
    #(STEP_PS);
    if (rst_n) advance();
    else t_last = $realtime;
  end

  assign vcp = VCM + vd / 2.0;
  assign vcn = VCM - vd / 2.0;
endmodule
