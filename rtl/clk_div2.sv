// clk_div2: divide-by-two in the PLL feedback path.
//
// A toggle flip-flop on the VCO clock: its output runs at half the VCO
// frequency with 50 % duty cycle. In the clock multiplier it turns the
// 1.25 GHz VCO phase back into 625 MHz for the phase detector, and the same
// clock is the word clock of the pseudorandom word generator.
//
// Interface: clk_in, asynchronous active-low rst_n (output low in reset),
// clk_out. The ratio follows the design; the flip-flop realisation and the
// reset are this implementation's choice.
module clk_div2 (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) clk_out <= 1'b0;
    else        clk_out <= ~clk_out;
  end
endmodule
