// mdc_cell: one cell of the mark density controller.
//
// D = y0 & (y1 | S1) & (y2 | S2), where y0, y1, y2 are three consecutive
// bits of the pseudorandom sequence (y0 oldest). With {S1,S2} = 00 the cell
// ANDs all three bits (mark density 1/8), 01 ANDs the first two (1/4), 10
// ANDs the first and the third (1/4), 11 passes y0 (1/2). One AND gate and
// two OR gates, as the design describes; combinational.
module mdc_cell (
  input  logic y0,
  input  logic y1,
  input  logic y2,
  input  logic s1,
  input  logic s2,
  output logic d
);
  timeunit 1ps;
  timeprecision 1fs;

  assign d = y0 & (y1 | s1) & (y2 | s2);
endmodule
