// prwg_cmu_top_tb: end-to-end testbench of the generator with its clock
// multiplier, at the design's default sizes.
//
// 1. The PLL is reset and must lock the 625 MHz word clock to the 625 MHz
//    reference (1600 ps period, edges within 10 ps) with the VCO at 1.25 GHz
//    and eight phases 100 ps apart; both pump directions must have acted.
// 2. For each of the five pattern lengths the generator is reset and runs
//    on the PLL's word clock. With mark density 1/2 the output words are the
//    raw sequence, checked bit by bit against y[m] = y[m-n] ^ y[m-n+a].
// 3. The testbench then extends the sequence itself by that recurrence and
//    switches the mark density controller through 1/8, 1/4 (adjacent),
//    1/4 (skip one) and back to 1/2, comparing every output bit with the
//    selected AND of the predicted bits.
// 4. Throughout 2 and 3, every word is followed onto the 10 Gb/s serial
//    output: bit i must appear in the 100 ps slot 800 ps + i*100 ps after
//    the word clock edge that captured the word.
// Each mechanism (five patterns, one-row and two-row feedback, four
// densities, PLL lock, up and down pumping, serial output) is counted; one
// that never happened is a failure. The word rate is checked: one 16-bit word per
// 1600 ps, 10 Gb/s of sequence.
module prwg_cmu_top_tb;
  timeunit 1ps;
  timeprecision 1fs;
  import prwg_pkg::*;

  logic        ref_clk = 1'b0;
  logic        pll_rst_n = 1'b0;
  logic        gen_rst_n = 1'b0;
  pattern_e    pat_sel = PAT_7;
  md_sel_e     md_sel = MD_1_2;
  logic [15:0] d;
  logic        word_clk, up, dn;
  logic [7:0]  phase;
  real         vcp, vcn;
  logic        sout;

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_pat [NPAT];
  int n_md [4];
  int n_one_row = 0, n_two_row = 0, n_lock = 0, n_up = 0, n_dn = 0;

  prwg_cmu_top dut (
    .ref_clk(ref_clk), .pll_rst_n(pll_rst_n), .gen_rst_n(gen_rst_n),
    .pat_sel(pat_sel), .md_sel(md_sel), .d(d), .word_clk(word_clk),
    .phase(phase), .up(up), .dn(dn), .vcp(vcp), .vcn(vcn), .sout(sout)
  );

  // Serial output: the word present before a word clock edge must leave
  // sout bit by bit, d[0] first, 800 ps + i*100 ps after that edge.
  logic [15:0] d_last;
  int          rst_epoch = 0;
  bit          ser_on = 1'b0;
  int          n_ser_words = 0;
  always @(negedge word_clk) d_last = d;
  always @(negedge gen_rst_n) rst_epoch++;
  always @(posedge word_clk) begin
    if (gen_rst_n && ser_on) begin
      fork
        begin : ser_check
          automatic logic [15:0] w = d_last;
          automatic realtime     t = $realtime;
          automatic int          ep = rst_epoch;
          automatic int          bad = 0;
          for (int i = 0; i < 16; i++) begin
            #(t + 850.0 + 100.0 * i - $realtime);
            if (sout !== w[i]) bad++;
          end
          if (ep == rst_epoch) begin
            checks++;
            if (bad != 0) begin
              failures++;
              if (failures < 20) $display("FAIL: serial word %h: %0d bits wrong", w, bad);
            end else begin
              n_ser_words++;
            end
          end
        end
      join_none
    end
  end

  always #800 ref_clk = ~ref_clk;

  realtime t_up, t_dn, t_ref;
  always @(posedge up) t_up = $realtime;
  always @(negedge up) if ($realtime - t_up > 1.0) n_up++;
  always @(posedge dn) t_dn = $realtime;
  always @(negedge dn) if ($realtime - t_dn > 1.0) n_dn++;
  always @(posedge ref_clk) t_ref = $realtime;

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic near(real got, real want, real tol, string tag);
    checks++;
    if (got > want + tol || got < want - tol) begin
      failures++;
      $display("FAIL %s: %f, expected %f", tag, got, want);
    end
  endtask

  bit bits[$];

  initial begin
    realtime t0, t1;
    int good, n, a, s, bad, k0;
    logic [15:0] exp_d;

    foreach (n_pat[i]) n_pat[i] = 0;
    foreach (n_md[i]) n_md[i] = 0;

    // 1. PLL lock
    #3000;
    pll_rst_n = 1'b1;
    good = 0;
    while (good < 40 && $realtime < 5.0e6) begin
      @(posedge word_clk);
      if ($realtime - t_ref < 10.0 || t_ref + 1600.0 - $realtime < 10.0) good++;
      else good = 0;
    end
    if (good >= 40) n_lock++;
    $display("PLL locked at %0.1f ns", $realtime / 1000.0);
    @(posedge word_clk); t0 = $realtime;
    @(posedge word_clk); t1 = $realtime;
    near(t1 - t0, 1600.0, 2.0, "word clock period (625 MS/s)");
    @(posedge phase[0]); t0 = $realtime;
    @(posedge phase[0]); t1 = $realtime;
    near(t1 - t0, 800.0, 2.0, "VCO period (1.25 GHz)");
    for (int k = 1; k < 8; k++) begin
      @(posedge phase[k]);
      near($realtime - t1, 100.0 * k, 2.0, $sformatf("phase %0d", k));
    end

    // 2. and 3. each pattern, each density
    ser_on = 1'b1;
    for (int p = 0; p < NPAT; p++) begin
      n = PAT_DEG[p];
      a = PAT_TAP[p];
      s = (n + 15) / 16;
      @(negedge word_clk);
      pat_sel = pattern_e'(p);
      md_sel = MD_1_2;
      gen_rst_n = 1'b0;
      @(negedge word_clk);
      bits.delete();
      gen_rst_n = 1'b1;
      for (int i = 0; i < 16; i++) bits.push_back(d[i]);
      repeat (150) begin
        @(negedge word_clk);
        for (int i = 0; i < 16; i++) bits.push_back(d[i]);
      end
      bad = 0;
      for (int m = 16 * s + 1; m <= bits.size(); m++) begin
        checks++;
        if (bits[m-1] != (bits[m-n-1] ^ bits[m-n+a-1])) bad++;
      end
      failures += bad;
      if (bad != 0) $display("FAIL: n=%0d %0d bits break the recurrence", n, bad);
      else begin
        n_pat[p]++;
        if (s == 1) n_one_row++;
        else n_two_row++;
      end

      foreach (n_md[sel]) begin
        // change the select right after a word clock edge, as d does
        @(posedge word_clk);
        md_sel = md_sel_e'(sel);
        for (int w = 0; w < 40; w++) begin
          @(negedge word_clk);
          k0 = bits.size();
          while (bits.size() < k0 + 18)
            bits.push_back(bits[bits.size()-n] ^ bits[bits.size()-n+a]);
          for (int i = 0; i < 16; i++) begin
            case (md_sel)
              MD_1_8:    exp_d[i] = bits[k0+i] & bits[k0+i+1] & bits[k0+i+2];
              MD_1_4:    exp_d[i] = bits[k0+i] & bits[k0+i+1];
              MD_1_4_SK: exp_d[i] = bits[k0+i] & bits[k0+i+2];
              default:   exp_d[i] = bits[k0+i];
            endcase
          end
          // drop the look-ahead bits again: they belong to the next word
          bits.delete(bits.size() - 1);
          bits.delete(bits.size() - 1);
          checks++;
          if (d !== exp_d) begin
            failures++;
            if (failures < 20)
              $display("FAIL: n=%0d md=%b word %h expected %h", n, md_sel, d, exp_d);
          end else if (w == 39) begin
            n_md[sel]++;
          end
        end
      end
    end

    // mechanism coverage
    foreach (n_pat[p]) begin
      checks++;
      if (n_pat[p] == 0) begin failures++; $display("FAIL: pattern %0d never ran", p); end
    end
    foreach (n_md[i]) begin
      checks++;
      if (n_md[i] == 0) begin failures++; $display("FAIL: density select %0d never ran", i); end
    end
    checks += 6;
    if (n_ser_words == 0) begin failures++; $display("FAIL: no serial word checked"); end
    if (n_one_row == 0) begin failures++; $display("FAIL: one-row mode never ran"); end
    if (n_two_row == 0) begin failures++; $display("FAIL: two-row mode never ran"); end
    if (n_lock == 0) begin failures++; $display("FAIL: PLL never locked"); end
    if (n_up == 0) begin failures++; $display("FAIL: no UP pulse"); end
    if (n_dn == 0) begin failures++; $display("FAIL: no DOWN pulse"); end
    $display("mechanisms: patterns %0d %0d %0d %0d %0d, one-row %0d, two-row %0d, densities %0d %0d %0d %0d, lock %0d, up %0d, down %0d, serial words %0d",
             n_pat[0], n_pat[1], n_pat[2], n_pat[3], n_pat[4], n_one_row, n_two_row,
             n_md[0], n_md[1], n_md[2], n_md[3], n_lock, n_up, n_dn, n_ser_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
