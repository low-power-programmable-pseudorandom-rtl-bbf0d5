// mdc: mark density controller.
//
// Lowers the density of ones in a pseudorandom word by ANDing each bit with
// one or both of the two bits that follow it in the sequence. A row of W
// cells; cell n takes y[n], y[n+1], y[n+2], so the input word carries two
// extension bits beyond the W output bits (the next word's first two bits).
//
// Select {S1,S2}: 00 -> 1/8, 01 -> 1/4 (adjacent bits), 10 -> 1/4 (bits n and
// n+2), 11 -> 1/2 (unchanged). Densities are for an ideal random source.
//
// Interface: y[0] is the oldest bit; d[n] drives output bit n. Combinational.
// The cell structure and select encoding follow the design description.
module mdc
  import prwg_pkg::*;
#(
  parameter int W = 16
) (
  input  logic [W+1:0] y,
  input  md_sel_e      md_sel,
  output logic [W-1:0] d
);
  timeunit 1ps;
  timeprecision 1fs;

  logic s1, s2;
  assign s1 = md_sel[1];
  assign s2 = md_sel[0];

  for (genvar n = 0; n < W; n++) begin : g_cell
    mdc_cell u_cell (
      .y0(y[n]), .y1(y[n+1]), .y2(y[n+2]), .s1(s1), .s2(s2), .d(d[n])
    );
  end
endmodule
