// pfd_tb: self-checking testbench of the tri-state phase frequency detector.
//
// Drives the reference and feedback inputs with two 1.6 ns clocks at known
// phase offsets and measures the width of the UP and DOWN pulses: when the
// reference leads by t, UP must be high for t each cycle and DOWN not at all
// (and the other way round); in phase, both stay low apart from the
// zero-width reset. With the reference 10 % faster, UP must dominate; with
// it slower, DOWN must dominate. Also checks the reset input.
module pfd_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic ref_clk = 1'b0;
  logic fb_clk = 1'b0;
  logic rst_n = 1'b0;
  logic up, dn;

  int checks = 0;
  int failures = 0;

  pfd dut (.ref_clk(ref_clk), .fb_clk(fb_clk), .rst_n(rst_n), .up(up), .dn(dn));

  realtime up_time = 0, dn_time = 0, t_up_rise, t_dn_rise;
  always @(posedge up) t_up_rise = $realtime;
  always @(negedge up) up_time += $realtime - t_up_rise;
  always @(posedge dn) t_dn_rise = $realtime;
  always @(negedge dn) dn_time += $realtime - t_dn_rise;

  initial begin
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (up %0.1f ps, dn %0.1f ps)", msg, up_time, dn_time);
    end
  endtask

  // Run ncyc cycles; ref period tr, fb period tf, fb delayed by off (may be < 0).
  task automatic run(int ncyc, real tr, real tf, real off);
    up_time = 0;
    dn_time = 0;
    fork
      begin
        if (off < 0) #(-off);
        repeat (ncyc) begin
          ref_clk = 1'b1; #(tr / 2); ref_clk = 1'b0; #(tr / 2);
        end
      end
      begin
        if (off > 0) #(off);
        repeat (ncyc) begin
          fb_clk = 1'b1; #(tf / 2); fb_clk = 1'b0; #(tf / 2);
        end
      end
    join
    #2000;
  endtask

  initial begin
    #500;
    check(!up && !dn, "outputs low in reset");
    rst_n = 1'b1;
    #500;
    run(10, 1600.0, 1600.0, 200.0);
    check(up_time > 10 * 199.0 && up_time < 10 * 201.0, "ref leads 200 ps: UP width");
    check(dn_time < 1.0, "ref leads: no DOWN");
    run(10, 1600.0, 1600.0, -300.0);
    check(dn_time > 10 * 299.0 && dn_time < 10 * 301.0, "fb leads 300 ps: DOWN width");
    check(up_time < 1.0, "fb leads: no UP");
    run(10, 1600.0, 1600.0, 0.0);
    check(up_time < 1.0 && dn_time < 1.0, "in phase: no pulses");
    run(40, 1455.0, 1600.0, 0.0);
    check(up_time > 4.0 * dn_time && up_time > 1000.0, "ref faster: UP dominates");
    run(40, 1760.0, 1600.0, 0.0);
    check(dn_time > 4.0 * up_time && dn_time > 1000.0, "ref slower: DOWN dominates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
