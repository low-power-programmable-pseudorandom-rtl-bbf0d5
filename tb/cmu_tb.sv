// cmu_tb: self-checking testbench of the clock multiplier unit.
//
// A 625 MHz reference (1600 ps) drives the PLL from reset; the VCO starts at
// its 1.10 GHz free-running frequency. After 3 us the testbench checks
// lock: the divided clock's period is 1600 ps and its rising edge lines up
// with the reference within 10 ps; phase[0] runs at 1.25 GHz (800 ps);
// phase[k] rises k*100 ps after phase[0]. It reports the lock time (first
// time the divided clock edge stays within 10 ps of the reference for 20
// cycles) and checks that both UP and DOWN pulses occurred during
// acquisition.
module cmu_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic       ref_clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] phase;
  logic       clk_div, up, dn;
  real        vcp, vcn;

  int checks = 0;
  int failures = 0;
  int n_up = 0, n_dn = 0;

  cmu dut (.ref_clk(ref_clk), .rst_n(rst_n), .phase(phase), .clk_div(clk_div),
           .up(up), .dn(dn), .vcp(vcp), .vcn(vcn));

  always #800 ref_clk = ~ref_clk;
  // count pulses of measurable width (in lock both pulses shrink to zero)
  realtime t_up, t_dn;
  always @(posedge up) t_up = $realtime;
  always @(negedge up) if ($realtime - t_up > 1.0) n_up++;
  always @(posedge dn) t_dn = $realtime;
  always @(negedge dn) if ($realtime - t_dn > 1.0) n_dn++;

  realtime t_ref;
  always @(posedge ref_clk) t_ref = $realtime;

  initial begin
    #20us;
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

  initial begin
    realtime t0, t1, t_lock;
    int good;
    #3000;
    rst_n = 1'b1;
    good = 0;
    t_lock = 0;
    while ($realtime < 3.0e6) begin
      @(posedge clk_div);
      // distance to the nearest reference edge
      if ($realtime - t_ref < 10.0 || t_ref + 1600.0 - $realtime < 10.0) begin
        good++;
        if (good == 20 && t_lock == 0) t_lock = $realtime;
      end else begin
        good = 0;
      end
    end
    $display("lock after %0.1f ns, vd = %f V, %0d UP and %0d DOWN pulses",
             (t_lock - 3000.0) / 1000.0, vcp - vcn, n_up, n_dn);
    checks++;
    if (t_lock == 0) begin
      failures++;
      $display("FAIL: no lock");
    end
    @(posedge clk_div); t0 = $realtime;
    @(posedge clk_div); t1 = $realtime;
    near(t1 - t0, 1600.0, 2.0, "divided clock period");
    near(t1 - t_ref, 0.0, 10.0, "divided clock aligned with reference");
    @(posedge phase[0]); t0 = $realtime;
    @(posedge phase[0]); t1 = $realtime;
    near(t1 - t0, 800.0, 2.0, "VCO period");
    for (int k = 1; k < 8; k++) begin
      @(posedge phase[k]);
      near($realtime - t1, 100.0 * k, 2.0, $sformatf("phase %0d", k));
    end
    near(vcp - vcn, 0.15, 0.01, "control voltage for 1.25 GHz");
    checks++;
    if (n_up == 0 || n_dn == 0) begin
      failures++;
      $display("FAIL: pump directions not both used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
