// loop_filter_tb: self-checking testbench of the loop filter model.
//
// A 100 uA current for 2 ns, then zero. Checks: during the pulse the
// differential voltage follows the analytic step response of the network; after
// the pulse the charge I*T ends up shared by C1 and C2, so
// vd -> I*T / (C1 + C2); the outputs stay symmetric about the common mode;
// a negative pulse brings vd back to zero; reset clears the filter.
module loop_filter_tb;
  timeunit 1ps;
  timeprecision 1fs;

  real  i_diff;
  logic rst_n;
  real  vcp, vcn;

  int checks = 0;
  int failures = 0;

  loop_filter dut (.i_diff(i_diff), .rst_n(rst_n), .vcp(vcp), .vcn(vcn));

  initial begin
    #10us;
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

  localparam real I = 100.0e-6;
  localparam real Q = I * 2.0e-9;
  localparam real CT = 50.0e-12 + 5.0e-12;

  initial begin
    i_diff = 0.0;
    rst_n = 1'b0;
    #100;
    rst_n = 1'b1;
    #100;
    near(vcp - vcn, 0.0, 1.0e-6, "start at zero");
    i_diff = I;
    #2000;
    // ramp I*t/(C1+C2) plus a step I*R*(C1/(C1+C2))^2 reached with the time
    // constant R*C1*C2/(C1+C2) = 4.55 ns
    near(vcp - vcn, I * 1.0e3 * (50.0 / 55.0) * (50.0 / 55.0) * (1.0 - $exp(-2.0 / 4.5454))
         + Q / CT, 0.001, "during pulse");
    i_diff = 0.0;
    #200000;
    near(vcp - vcn, Q / CT, 0.01 * Q / CT, "charge shared after pulse");
    near((vcp + vcn) / 2.0, 0.9, 1.0e-9, "common mode");
    i_diff = -I;
    #2000;
    i_diff = 0.0;
    #200000;
    near(vcp - vcn, 0.0, 0.01 * Q / CT, "negative pulse removes charge");
    i_diff = I;
    #5000;
    i_diff = 0.0;
    rst_n = 1'b0;
    #100;
    near(vcp - vcn, 0.0, 1.0e-9, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
