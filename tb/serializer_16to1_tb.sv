// serializer_16to1_tb: self-checking testbench of the 16:1 serializer.
//
// Generates ideal eight-phase 1.25 GHz clocks and the word clock (phase 0
// divided by two), presents a new random word after each word clock edge,
// and samples the serial output in the middle of every 100 ps bit slot. Bit
// i of the word captured at a word clock edge at time t must appear in the
// slot starting at t + 800 ps + i*100 ps. Also checks that the output is
// zero in reset.
module serializer_16to1_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic [7:0]  phase;
  logic        word_clk = 1'b0;
  logic        rst_n = 1'b1;
  logic [15:0] d;
  logic        sout;

  int checks = 0;
  int failures = 0;

  serializer_16to1 dut (.word_clk(word_clk), .phase(phase), .rst_n(rst_n), .d(d), .sout(sout));

  logic [2:0] cnt = 3'd0;
  always_comb
    for (int k = 0; k < 8; k++) phase[k] = ((cnt - 3'(k)) < 3'd4);
  always #100 cnt = cnt + 3'd1;
  always @(posedge phase[0]) word_clk <= ~word_clk;

  initial begin
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] sent[$];
  realtime     t_cap[$];

  // new word after every capture edge, like the generator
  always @(posedge word_clk) begin
    if (rst_n) begin
      sent.push_back(d);
      t_cap.push_back($realtime);
    end
    #1 d = 16'($urandom);
  end

  initial begin
    logic [15:0] w;
    realtime t;
    d = 16'($urandom);
    #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
    #999;
    checks++;
    if (sout !== 1'b0) failures++;
    @(negedge word_clk);
    rst_n = 1'b1;
    repeat (200) begin
      wait (sent.size() > 0);
      w = sent.pop_front();
      t = t_cap.pop_front();
      for (int i = 0; i < 16; i++) begin
        #(t + 850.0 + 100.0 * i - $realtime);
        checks++;
        if (sout !== w[i]) begin
          failures++;
          if (failures < 10) $display("FAIL: word %h bit %0d got %b", w, i, sout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
