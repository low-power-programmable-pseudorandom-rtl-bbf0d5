// mdc_tb: self-checking testbench of the mark density controller.
//
// Random 18-bit input words under all four selects; each output bit is
// compared with the select's function written from the truth table
// (00: y[n]&y[n+1]&y[n+2], 01: y[n]&y[n+1], 10: y[n]&y[n+2], 11: y[n]).
// It also feeds a long stretch of a 2^15-1 sequence and checks that the
// fraction of ones lands near 1/8, 1/4, 1/4 and 1/2.
module mdc_tb;
  timeunit 1ps;
  timeprecision 1fs;
  import prwg_pkg::*;

  logic [17:0] y;
  md_sel_e     md_sel;
  logic [15:0] d;

  int checks = 0;
  int failures = 0;

  mdc dut (.y(y), .md_sel(md_sel), .d(d));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] model(logic [17:0] v, logic [1:0] sel);
    logic [15:0] r;
    for (int n = 0; n < 16; n++)
      case (sel)
        2'b00: r[n] = v[n] & v[n+1] & v[n+2];
        2'b01: r[n] = v[n] & v[n+1];
        2'b10: r[n] = v[n] & v[n+2];
        default: r[n] = v[n];
      endcase
    return r;
  endfunction

  initial begin
    logic [14:0] lfsr;
    bit          sbits[$];
    int          ones;
    int          nbits;
    for (int s = 0; s < 4; s++) begin
      md_sel = md_sel_e'(s);
      for (int t = 0; t < 500; t++) begin
        y = 18'($urandom);
        #1000;
        checks++;
        if (d !== model(y, 2'(s))) begin
          failures++;
          if (failures < 10) $display("FAIL sel=%0d y=%h d=%h", s, y, d);
        end
      end
    end
    // Density over a 2^15-1 sequence (x^15 + x^14 + 1).
    lfsr = 15'h1;
    for (int i = 0; i < 16 * 2048 + 2; i++) begin
      sbits.push_back(lfsr[14]);
      lfsr = {lfsr[13:0], lfsr[14] ^ lfsr[13]};
    end
    for (int s = 0; s < 4; s++) begin
      real want, got;
      md_sel = md_sel_e'(s);
      ones = 0;
      nbits = 0;
      for (int w = 0; w < 2048; w++) begin
        for (int i = 0; i < 18; i++) y[i] = sbits[16*w + i];
        #1000;
        ones += $countones(d);
        nbits += 16;
      end
      want = (s == 0) ? 0.125 : (s == 3) ? 0.5 : 0.25;
      got = real'(ones) / real'(nbits);
      checks++;
      if (got < want * 0.95 || got > want * 1.05) begin
        failures++;
        $display("FAIL density sel=%0d: %f, expected about %f", s, got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
