// charge_pump_tb: self-checking testbench of the charge pump model.
//
// Applies the four UP/DOWN combinations: UP alone gives +I, DOWN alone -I,
// both high or both low hold (zero current). Done at the default current
// and at 250 uA.
module charge_pump_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic up, dn;
  real  i0, i1;

  int checks = 0;
  int failures = 0;

  charge_pump dut (.up(up), .dn(dn), .i_diff(i0));
  charge_pump #(.I_PUMP(250.0e-6)) dut2 (.up(up), .dn(dn), .i_diff(i1));

  initial begin
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_i(real got, real want, string tag);
    checks++;
    if (got > want + 1.0e-9 || got < want - 1.0e-9) begin
      failures++;
      $display("FAIL %s: %e A, expected %e A", tag, got, want);
    end
  endtask

  initial begin
    real s;
    for (int c = 0; c < 4; c++) begin
      {up, dn} = 2'(c);
      #100;
      s = (c == 2) ? 1.0 : (c == 1) ? -1.0 : 0.0;
      expect_i(i0, s * 100.0e-6, $sformatf("up=%b dn=%b", up, dn));
      expect_i(i1, s * 250.0e-6, $sformatf("250uA up=%b dn=%b", up, dn));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
