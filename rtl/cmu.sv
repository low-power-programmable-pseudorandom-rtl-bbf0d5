// cmu: clock multiplier unit, a charge-pump PLL that turns a 625 MHz
// reference into eight phases of a 1.25 GHz clock.
//
// Phase detector -> charge pump -> loop filter -> ring VCO, with the VCO's
// phase 0 divided by two and fed back. In lock the divided clock is
// aligned with the reference, the VCO runs at twice the reference, and the
// eight phases give a 100 ps grid (ten bit slots per nanosecond) for a
// 16:1 serializer. The divided clock (625 MHz) is also brought out as the
// word clock of the pseudorandom word generator.
//
// Interface: ref_clk, rst_n (clears the phase detector, divider and filter),
// phase[7:0], clk_div (625 MHz), up/dn (phase detector outputs, for
// observation), vcp/vcn (real control voltages, for observation).
//
// A structural wrapper of one RTL block (pfd, clk_div2) and behavioural
// models (charge_pump, loop_filter, vco); the block diagram follows the
// design, the analog values are assumed.
module cmu #(
  parameter real I_PUMP = 100.0e-6,
  parameter real R_SER  = 1.0e3,
  parameter real C1     = 50.0e-12,
  parameter real C2     = 5.0e-12,
  parameter real F_FREE = 1.10e9,
  parameter real KVCO   = 1.0e9
) (
  input  logic       ref_clk,
  input  logic       rst_n,
  output logic [7:0] phase,
  output logic       clk_div,
  output logic       up,
  output logic       dn,
  output real        vcp,
  output real        vcn
);
  timeunit 1ps;
  timeprecision 1fs;

  real i_diff;

  pfd u_pfd (.ref_clk(ref_clk), .fb_clk(clk_div), .rst_n(rst_n), .up(up), .dn(dn));

  charge_pump #(.I_PUMP(I_PUMP)) u_cp (.up(up), .dn(dn), .i_diff(i_diff));

  loop_filter #(.R_SER(R_SER), .C1(C1), .C2(C2)) u_lpf (
    .i_diff(i_diff), .rst_n(rst_n), .vcp(vcp), .vcn(vcn)
  );

  vco #(.F_FREE(F_FREE), .KVCO(KVCO)) u_vco (.vcp(vcp), .vcn(vcn), .phase(phase));

  clk_div2 u_div (.clk_in(phase[0]), .rst_n(rst_n), .clk_out(clk_div));
endmodule
