// clk_div2_tb: self-checking testbench of the divide-by-two.
//
// Drives an 800 ps clock and checks that the output is low in reset, then
// toggles on every input rising edge: a 1600 ps period with 800 ps high and
// low times, the output a function of the input edge count.
module clk_div2_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk_in = 1'b0;
  logic rst_n = 1'b0;
  logic clk_out;

  int checks = 0;
  int failures = 0;
  int edges = 0;

  clk_div2 dut (.clk_in(clk_in), .rst_n(rst_n), .clk_out(clk_out));

  always #400 clk_in = ~clk_in;

  initial begin
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t_rise, t_prev;
    #2000;
    checks++;
    if (clk_out !== 1'b0) failures++;
    @(negedge clk_in);
    rst_n = 1'b1;
    repeat (40) begin
      @(posedge clk_in);
      edges++;
      #100;
      checks++;
      if (clk_out !== 1'(edges % 2)) begin
        failures++;
        $display("FAIL: after %0d edges output %b", edges, clk_out);
      end
    end
    @(posedge clk_out); t_prev = $realtime;
    @(posedge clk_out); t_rise = $realtime;
    checks++;
    if (t_rise - t_prev != 1600.0) begin
      failures++;
      $display("FAIL: period %0.1f ps", t_rise - t_prev);
    end
    @(negedge clk_out);
    checks++;
    if ($realtime - t_rise != 800.0) begin
      failures++;
      $display("FAIL: high time %0.1f ps", $realtime - t_rise);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
