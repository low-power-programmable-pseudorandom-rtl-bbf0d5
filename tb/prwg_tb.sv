// prwg_tb: self-checking testbench of the pseudorandom word generator.
//
// The words are unpacked into the bit stream they stand for (word bit 0
// first) and checked against the pattern's recurrence
// y[m] = y[m-n] ^ y[m-n+a], written here independently of the design's
// operators, for every bit the generator computed. Also checked: the two
// extension bits of each word equal the first two bits of the next word, the
// stream is not all zero, for n = 7, 10, 15 the stream repeats after exactly
// 2^n - 1 words with 2^(n-1) ones per period, for n = 7 the reset seed itself
// obeys the recurrence, and a pattern change without reset (15 -> 10 and
// 15 -> 23, one-row to two-row mode) settles to the new pattern. One word is
// produced per clock; the stream check would fail on a missed or repeated
// word. A second instance with 8-bit words checks the generic sizing:
// 2^9-1 in two rows, 2^23-1 in three and 2^31-1 in four.
module prwg_tb;
  timeunit 1ps;
  timeprecision 1fs;
  import prwg_pkg::*;

  localparam int M = 16;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [2:0]  pat_sel;
  logic [17:0] y_word;

  int checks = 0;
  int failures = 0;

  prwg dut (.clk(clk), .rst_n(rst_n), .pat_sel(pat_sel), .y_word(y_word));

  // A second, generic configuration: 8-bit words, patterns 2^9-1
  // (x^9 + x^5 + 1, two rows of 8), 2^23-1 (three rows) and 2^31-1 (four).
  logic       rst2_n;
  logic [2:0] pat2;
  logic [9:0] y2;
  prwg #(.M(8), .K(3), .DEG('{9, 23, 7, 15, 31}), .TAP('{4, 5, 1, 1, 3}), .RECUR(5'b00000)) dut_gen (
    .clk(clk), .rst_n(rst2_n), .pat_sel(pat2), .y_word(y2)
  );

  always #5000 clk = ~clk;

  initial begin
    #2000ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit           bits[$];
  logic [17:0]  words[$];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  task automatic collect(int nwords);
    repeat (nwords) begin
      @(negedge clk);
      words.push_back(y_word);
      for (int i = 0; i < M; i++) bits.push_back(y_word[i]);
    end
  endtask

  task automatic reset_to(int p);
    rst_n = 1'b0;
    pat_sel = 3'(p);
    bits.delete();
    words.delete();
    @(negedge clk);
    @(negedge clk);
    // sample the reset word, then release so the next edge generates
    words.push_back(y_word);
    for (int i = 0; i < M; i++) bits.push_back(y_word[i]);
    rst_n = 1'b1;
  endtask

  // Check bits [from, bits.size()) against the recurrence (1-based m).
  task automatic check_recurrence(int n, int a, int from_m, string tag);
    int bad;
    bad = 0;
    for (int m = from_m; m <= bits.size(); m++) begin
      bit exp_b;
      exp_b = bits[m-n-1] ^ bits[m-n+a-1];
      checks++;
      if (bits[m-1] !== exp_b) begin
        bad++;
        failures++;
      end
    end
    if (bad != 0) $display("FAIL: %s: %0d bits break the recurrence", tag, bad);
  endtask

  task automatic check_overlap(int from_k, string tag);
    int bad;
    bad = 0;
    for (int k = from_k; k + 1 < words.size(); k++) begin
      checks++;
      if (words[k][17:16] !== words[k+1][1:0]) begin
        bad++;
        failures++;
      end
    end
    if (bad != 0) $display("FAIL: %s: %0d words with wrong extension bits", tag, bad);
  endtask

  initial begin
    rst_n = 1'b0;
    rst2_n = 1'b0;
    pat2 = 3'd0;
    pat_sel = 3'd0;
    for (int p = 0; p < NPAT; p++) begin
      int n, a, s, period, nw, ones;
      n = PAT_DEG[p];
      a = PAT_TAP[p];
      s = (n + M - 1) / M;
      period = (n <= 15) ? (1 << n) - 1 : 0;
      nw = (period != 0) ? period + 40 : 3000;
      reset_to(p);
      collect(nw);
      check_recurrence(n, a, (p == 0) ? n + 1 : s * M + 1, $sformatf("n=%0d", n));
      check_overlap(s, $sformatf("n=%0d", n));
      ones = 0;
      foreach (bits[i]) ones += int'(bits[i]);
      check(ones > 0, $sformatf("n=%0d stream all zero", n));
      if (period != 0) begin
        int one_cnt;
        one_cnt = 0;
        for (int i = 0; i < period; i++) one_cnt += int'(bits[16*s + 16 + i]);
        check(one_cnt == (1 << (n - 1)), $sformatf("n=%0d ones per period %0d", n, one_cnt));
        for (int k = 2; k < 34; k++)
          check(words[k + period] == words[k], $sformatf("n=%0d period", n));
        for (int k = 2; k < 30; k++)
          check(words[k + period - 1] != words[k] || words[k+1] != words[k + period],
                $sformatf("n=%0d period too short", n));
      end
    end

    // Live pattern changes: n = 15 -> n = 10 (one row), then -> n = 23 (two rows).
    reset_to(int'(PAT_15));
    collect(50);
    pat_sel = 3'(PAT_10);
    begin
      int start_bits;
      start_bits = bits.size();
      collect(200);
      check_recurrence(10, 3, start_bits + 2*M + 1, "switch 15->10");
      pat_sel = 3'(PAT_23);
      start_bits = bits.size();
      collect(400);
      check_recurrence(23, 5, start_bits + 3*M + 1, "switch 10->23");
    end

    // Generic configuration: rows = ceil(n/8) = 2, 3 and 4.
    for (int qi = 0; qi < 3; qi++) begin
      int q, n, a, st, bad;
      q = (qi == 2) ? 4 : qi;
      n = (q == 0) ? 9 : (q == 1) ? 23 : 31;
      a = (q == 0) ? 4 : (q == 1) ? 5 : 3;
      st = (n + 7) / 8;
      rst2_n = 1'b0;
      pat2 = 3'(q);
      bits.delete();
      @(negedge clk);
      for (int i = 0; i < 8; i++) bits.push_back(y2[i]);
      rst2_n = 1'b1;
      repeat (1500) begin
        @(negedge clk);
        for (int i = 0; i < 8; i++) bits.push_back(y2[i]);
      end
      check_recurrence(n, a, 8 * st + 1, $sformatf("generic M=8 n=%0d", n));
      bad = 0;
      foreach (bits[i]) bad += int'(bits[i]);
      check(bad > 0, "generic stream all zero");
      if (q == 0) begin
        // period 511 words of 8 bits: the stream repeats after 511 words
        for (int k = 16; k < 16 + 320; k++)
          check(bits[k] == bits[k + 8*511], "generic n=9 period");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
