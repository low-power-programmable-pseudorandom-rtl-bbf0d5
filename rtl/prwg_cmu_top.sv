// prwg_cmu_top: pseudorandom word generator with its clock multiplier, as
// integrated for serializer loop-back self test.
//
// The clock multiplier locks a 1.25 GHz, eight-phase clock to the 625 MHz
// reference. Its divided-by-two output is the 625 MHz word clock: each cycle
// the generator produces the next 16 bits of the selected PRBS and the mark
// density controller thins them to the selected density. The 16:1
// serializer, clocked by the eight phases, sends each word d[0] first as a
// 10 Gb/s stream on sout.
//
// Interface: ref_clk (625 MHz), pll_rst_n (asynchronous, active low, resets
// the clock multiplier), gen_rst_n (asynchronous, active low, loads the
// generator's seed; assert it after changing pat_sel), pat_sel (prwg_pkg::pattern_e), md_sel ({S1,S2}), d[15:0]
// (word out, d[0] oldest), word_clk, phase[7:0], up/dn, vcp/vcn (PLL
// observation), sout (10 Gb/s serial stream). d changes just after the
// rising edge of word_clk; the serializer captures the previous word at that
// edge and sends its bit i from 800 ps + i*100 ps after it.
//
// Contains behavioural models of the analog PLL parts, so it is a
// simulation model as a whole; prwg, mdc, serializer_16to1, pfd and
// clk_div2 are synthesizable.
module prwg_cmu_top
  import prwg_pkg::*;
(
  input  logic       ref_clk,
  input  logic       pll_rst_n,
  input  logic       gen_rst_n,
  input  pattern_e   pat_sel,
  input  md_sel_e    md_sel,
  output logic [15:0] d,
  output logic       word_clk,
  output logic [7:0] phase,
  output logic       up,
  output logic       dn,
  output real        vcp,
  output real        vcn,
  output logic       sout
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [17:0] y_word;

  cmu u_cmu (
    .ref_clk(ref_clk), .rst_n(pll_rst_n), .phase(phase), .clk_div(word_clk),
    .up(up), .dn(dn), .vcp(vcp), .vcn(vcn)
  );

  prwg u_prwg (.clk(word_clk), .rst_n(gen_rst_n), .pat_sel(pat_sel), .y_word(y_word));

  mdc #(.W(16)) u_mdc (.y(y_word), .md_sel(md_sel), .d(d));

  serializer_16to1 u_ser (
    .word_clk(word_clk), .phase(phase), .rst_n(gen_rst_n), .d(d), .sout(sout)
  );
endmodule
