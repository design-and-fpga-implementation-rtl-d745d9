// tb_conv_encoder -- checks the K=7 rate-1/2 encoder (171/133 octal).
//
// First the impulse response: a single 1 after reset must give the
// generator taps, X = 1111001 and Y = 1011011 in time order. Then random
// bits with random gaps are compared with an explicit shift-register model.
`timescale 1ns/1ps
module tb_conv_encoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic u, vin, x, y, vout;
  conv_encoder dut (.clk, .rst_n, .u, .vin, .x, .y, .vout);

  int checks = 0, failures = 0;
  logic [6:0] sr;   // sr[0] = current input, sr[k] = input k steps ago
  logic ex, ey;

  task automatic step(logic b);
    u <= b; vin <= 1;
    @(posedge clk);
    vin <= 0;
    sr = {sr[5:0], b};
    // G1 = 171 = 1 111 001: taps at delays 0,1,2,3,6 ; G2 = 133 = 1 011 011: 0,2,3,5,6
    ex = sr[0] ^ sr[1] ^ sr[2] ^ sr[3] ^ sr[6];
    ey = sr[0] ^ sr[2] ^ sr[3] ^ sr[5] ^ sr[6];
    @(posedge clk);
    checks++;
    if (!vout || x != ex || y != ey) failures++;
    if ($urandom_range(1)) @(posedge clk);
  endtask

  initial begin
    logic [6:0] xs, ys;
    u = 0; vin = 0; sr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < 7; i++) begin
      u <= (i == 0); vin <= 1;
      @(posedge clk);
      vin <= 0;
      @(posedge clk);
      xs[6-i] = x; ys[6-i] = y;
    end
    checks++;
    if (xs != 7'b1111001 || ys != 7'b1011011) begin
      failures++;
      $display("impulse response X=%b Y=%b", xs, ys);
    end
    sr = '0;
    rst_n = 0; @(posedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) step(1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
