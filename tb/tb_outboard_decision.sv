// tb_outboard_decision -- checks the uncoded-bit decision. For every input
// from -5A to +5A and both values of the coded bit C, the expected U is the
// nearest of the two points left once C is known (C = 1: -3A gives 1, +A
// gives 0; C = 0: -A gives 1, +3A gives 0), decided in real arithmetic;
// inputs within one LSB of the midpoint are not scored. Also checks the
// 3-cycle latency.
`timescale 1ns/1ps
module tb_outboard_decision;
  import dvb_pkg::*;

  localparam int A = 162;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  sample_t x;
  logic c, vin, u, vout;
  outboard_decision #(.AMP(A)) dut (.clk, .rst_n, .x, .c, .vin, .u, .vout);

  int checks = 0, failures = 0;
  int expq [$];
  int sent_cyc [$];
  int cyc = 0;

  always_ff @(posedge clk) cyc <= cyc + 1;
  always_ff @(posedge clk) if (rst_n && vin) sent_cyc.push_back(cyc);

  always_ff @(posedge clk) begin
    if (rst_n && vout) begin
      int e, t;
      e = expq.pop_front();
      t = sent_cyc.pop_front();
      checks++;
      if (cyc - t != 3 || (e >= 0 && int'(u) != e)) begin
        failures++;
        if (failures < 8) $display("u %0d expected %0d (latency %0d)", u, e, cyc - t);
      end
    end
  end

  initial begin
    x = 0; c = 0; vin = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int xi = -5 * A; xi <= 5 * A; xi++)
      for (int cb = 0; cb < 2; cb++) begin
        real p1, p0, d1, d0;
        p1 = cb ? -3.0 * A : -1.0 * A;   // point with U = 1
        p0 = cb ?  1.0 * A :  3.0 * A;   // point with U = 0
        d1 = xi - p1; d1 = d1 * d1;
        d0 = xi - p0; d0 = d0 * d0;
        x <= sample_t'(xi); c <= cb[0]; vin <= 1;
        if ((xi - (p1 + p0) / 2.0) < 1.01 && (xi - (p1 + p0) / 2.0) > -1.01) expq.push_back(-1);
        else expq.push_back((d1 < d0) ? 1 : 0);
        @(posedge clk);
        if (xi % 89 == 0) begin vin <= 0; @(posedge clk); end
      end
    vin <= 0;
    repeat (6) @(posedge clk);
    checks++;
    if (expq.size() != 0) failures++;
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
