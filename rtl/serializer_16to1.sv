// serializer_16to1: 16:1 serializer clocked by the eight 1.25 GHz phases.
//
// Turns one 16-bit word per 625 MHz word clock into a 10 Gb/s serial stream
// with two stages of multiplexers. Stage 1 is eight 2:1 multiplexers: lane j
// carries word bit j while the word clock is low and bit j+8 while it is
// high, so each lane runs at 1.25 Gb/s. Stage 2 is an 8:1 time-division
// multiplexer: lane j drives the output during the 100 ps window in which
// phase[j] is high and phase[j+1] is still low. Eight windows per 800 ps
// VCO period give ten bits per nanosecond.
//
// The word on d is captured into a word register at the rising edge of
// word_clk (the same edge at which the generator moves on to the next word),
// and bits 8..15 are copied into a holding register at the falling edge, so
// each bit is stable for its whole window.
//
// Interface: word_clk (must be phase[0] divided by two, rising on a rising
// edge of phase[0]), phase[7:0], rst_n (asynchronous, active low), d[15:0]
// (d[0] is sent first), sout. Timing: bit i of the word captured at a word
// clock edge at time t leaves sout from t + 800 ps + i*100 ps to
// t + 900 ps + i*100 ps, so the serial latency is 800 ps from capture.
//
// The 16:1 ratio, the two-stage tree and the use of the eight CMU phases
// follow the design description; the split into eight 2:1 and one 8:1
// multiplexer, the capture registers and the timing are this
// implementation's choice. Stage 2 gates data with clock phases, which is
// how a time-division multiplexer works in silicon but needs care in
// synthesis and timing analysis.
module serializer_16to1 (
  input  logic        word_clk,
  input  logic [7:0]  phase,
  input  logic        rst_n,
  input  logic [15:0] d,
  output logic        sout
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [15:0] wreg;   // word being sent
  logic [7:0]  hreg;   // bits 8..15, held through the second half
  logic [7:0]  lane;
  logic [7:0]  win;

  always_ff @(posedge word_clk or negedge rst_n) begin
    if (!rst_n) wreg <= '0;
    else        wreg <= d;
  end

  always_ff @(negedge word_clk or negedge rst_n) begin
    if (!rst_n) hreg <= '0;
    else        hreg <= wreg[15:8];
  end

  // Stage 1: eight 2:1 multiplexers.
  always_comb begin
    for (int j = 0; j < 8; j++)
      lane[j] = word_clk ? hreg[j] : wreg[j];
  end

  // Stage 2: 8:1 time-division multiplexer on the phase windows.
  always_comb begin
    for (int j = 0; j < 8; j++)
      win[j] = phase[j] & ~phase[(j + 1) % 8];
  end

  assign sout = |(lane & win);
endmodule
