// vco_tb: self-checking testbench of the ring oscillator model.
//
// Sets the differential control voltage to -0.2, 0, +0.15 and +0.4 V and
// measures the period of phase[0] against f = F_FREE + KVCO*(Vc+ - Vc-)
// (1.10 GHz + 1 GHz/V by default), including the upper limit; and checks
// that phase[k] rises k/8 of a period after phase[0] with 50 % duty cycle.
module vco_tb;
  timeunit 1ps;
  timeprecision 1fs;

  real        vcp, vcn;
  logic [7:0] phase;

  int checks = 0;
  int failures = 0;

  vco dut (.vcp(vcp), .vcn(vcn), .phase(phase));
  vco #(.F_MAX(1.2e9)) dut_lim (.vcp(vcp), .vcn(vcn), .phase());

  initial begin
    #1us;
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
    real vds [4];
    realtime t0, t1, tk;
    real per;
    vds = '{-0.2, 0.0, 0.15, 0.4};
    for (int i = 0; i < 4; i++) begin
      vcp = 0.9 + vds[i] / 2.0;
      vcn = 0.9 - vds[i] / 2.0;
      repeat (3) @(posedge phase[0]);
      t0 = $realtime;
      @(posedge phase[0]);
      t1 = $realtime;
      per = t1 - t0;
      near(per, 1.0e12 / (1.10e9 + 1.0e9 * vds[i]), 0.5, $sformatf("period at vd=%f", vds[i]));
      for (int k = 1; k < 8; k++) begin
        @(posedge phase[k]);
        tk = $realtime;
        near(tk - t1, per * k / 8.0, 0.5, $sformatf("phase %0d lag", k));
      end
      @(negedge phase[0]);
      near($realtime - t1, per * 1.5, 0.5, "duty cycle");
    end
    // limited model: 0.4 V would ask for 1.5 GHz, limit is 1.2 GHz
    @(posedge dut_lim.phase[0]);
    t0 = $realtime;
    @(posedge dut_lim.phase[0]);
    near($realtime - t0, 1.0e12 / 1.2e9, 0.5, "upper frequency limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
