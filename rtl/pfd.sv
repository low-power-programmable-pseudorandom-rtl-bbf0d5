// pfd: tri-state phase frequency detector.
//
// Two flip-flops with their data inputs tied high. The rising edge of the
// reference clock sets UP, the rising edge of the divided VCO clock (INT)
// sets DOWN, and as soon as both are high an AND gate clears both. The
// output that is high for part of the cycle therefore tells which edge came
// first, and its width is the phase difference; with equal phases both
// pulses shrink to the reset time.
//
// Interface: ref_clk, fb_clk (divided VCO clock), rst_n (asynchronous
// active-low clear, an addition so the detector starts from the idle state),
// up, dn. Asynchronous: no clock of its own.
//
// The structure follows the design's tri-state PFD; the design builds it in
// true single-phase-clock dynamic logic, which this RTL does not model, and
// its reset path here has zero delay.
module pfd (
  input  logic ref_clk,
  input  logic fb_clk,
  input  logic rst_n,
  output logic up,
  output logic dn
);
  timeunit 1ps;
  timeprecision 1fs;

  logic clr;
  assign clr = (up & dn) | ~rst_n;

  always_ff @(posedge ref_clk or posedge clr) begin
    if (clr) up <= 1'b0;
    else     up <= 1'b1;
  end

  always_ff @(posedge fb_clk or posedge clr) begin
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;
  end
endmodule
