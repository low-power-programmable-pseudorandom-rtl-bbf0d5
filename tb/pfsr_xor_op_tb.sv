// pfsr_xor_op_tb: self-checking testbench of the XOR operator.
//
// Three operators: n = 7 with recursive substitution (16 bits in, 18 out),
// n = 7 without it, and n = 23 with 32 bits in. Each is fed random input
// windows and its outputs are compared with the next bits computed serially,
// one bit at a time, by the testbench: by y[m] = y[m-n] ^ y[m-n+a] for the
// plain operators and by y[m] = y[m-2n] ^ y[m-2n+2a] for the substituted
// one. For windows taken from a true 2^7-1 sequence, both n = 7 operators
// must agree with each other and with the plain recurrence.
module pfsr_xor_op_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic [15:0] in7;
  logic [17:0] out7r, out7p;
  logic [31:0] in23;
  logic [17:0] out23;

  int checks = 0;
  int failures = 0;

  pfsr_xor_op dut_r (.y_in(in7), .y_out(out7r));
  pfsr_xor_op #(.N(7), .A(1), .RECUR(1'b0), .IN_W(16), .OUT_W(18)) dut_p (.y_in(in7), .y_out(out7p));
  pfsr_xor_op #(.N(23), .A(5), .RECUR(1'b0), .IN_W(32), .OUT_W(18)) dut_23 (.y_in(in23), .y_out(out23));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Serial extension of a window; recursive form if twice.
  function automatic logic [49:0] extend(logic [49:0] v, int in_w, int n, int a, bit twice);
    for (int m = in_w + 1; m <= in_w + 18; m++)
      v[m-1] = twice ? (v[m-2*n-1] ^ v[m-2*n+2*a-1]) : (v[m-n-1] ^ v[m-n+a-1]);
    return v;
  endfunction

  task automatic cmp(logic [17:0] got, logic [17:0] exp_v, string tag);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", tag, got, exp_v);
    end
  endtask

  initial begin
    logic [49:0] v;
    logic [6:0]  st;
    for (int t = 0; t < 2000; t++) begin
      in7  = 16'($urandom);
      in23 = $urandom;
      #1000;
      v = '0; v[15:0] = in7;
      v = extend(v, 16, 7, 1, 1'b1);
      cmp(out7r, v[33:16], "n=7 recursive");
      v = '0; v[15:0] = in7;
      v = extend(v, 16, 7, 1, 1'b0);
      cmp(out7p, v[33:16], "n=7 plain");
      v = '0; v[31:0] = in23;
      v = extend(v, 32, 23, 5, 1'b0);
      cmp(out23, v[49:32], "n=23");
    end
    // Windows of a true 2^7-1 sequence: both forms give the same bits.
    for (int t = 0; t < 200; t++) begin
      st = 7'($urandom) | 7'd1;
      v = '0; v[6:0] = st;
      for (int m = 8; m <= 16; m++) v[m-1] = v[m-8] ^ v[m-7];
      in7 = v[15:0];
      #1000;
      v = extend(v, 16, 7, 1, 1'b0);
      cmp(out7r, v[33:16], "n=7 recursive on valid window");
      cmp(out7p, out7r, "n=7 forms agree");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
