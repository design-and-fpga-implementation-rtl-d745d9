// tb_soft_decision -- checks the 3-bit soft-decision unit.
//
// Every input from -5A to +5A (A = 162, 1/sqrt(10) in Sfix(12,9)) is sent,
// one per cycle. The expected weight is worked out in real arithmetic:
// u = x/A, and the weight is the position of u inside its span between
// constellation points, in eighths: 7 at -3 and +1 (coded bit 1 for sure),
// 0 at -1 and +3, linear in between, saturating outside. Samples within
// one LSB of a bin edge are not scored (rounding of the edge is free).
// Also checks the anchor points exactly and the 3-cycle latency.
`timescale 1ns/1ps
module tb_soft_decision;
  import dvb_pkg::*;

  localparam int A = 162;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  sample_t x;
  logic vin, vout;
  logic [2:0] w;
  soft_decision #(.AMP(A)) dut (.clk, .rst_n, .x, .vin, .w, .vout);

  int checks = 0, failures = 0;
  int expq [$];      // expected weight, -1 = not scored
  int sent_cyc [$];
  int cyc = 0;

  always_ff @(posedge clk) cyc <= cyc + 1;

  function automatic int expect_w(int xi);
    real u, pos, edge_dist;
    int b;
    u = xi;
    u = u / A;
    // distance from the nearest bin edge in LSBs: edges at -3+k/4 except
    // the constellation points themselves
    for (int k = 1; k < 24; k++) begin
      real e;
      if (k == 8 || k == 16) continue;
      e = (-3.0 + k / 4.0) * A;
      edge_dist = xi - e;
      if (edge_dist < 1.01 && edge_dist > -1.01) return -1;
    end
    if (u <= -3.0) return 7;
    if (u >= 3.0) return 0;
    if (u < -1.0) begin pos = (u + 3.0) * 4.0; b = int'($floor(pos)); return 7 - b; end
    if (u < 1.0)  begin pos = (u + 1.0) * 4.0; b = int'($floor(pos)); return b; end
    pos = (u - 1.0) * 4.0; b = int'($floor(pos)); return 7 - b;
  endfunction

  always_ff @(posedge clk) begin
    if (rst_n && vout) begin
      int e, c;
      e = expq.pop_front();
      c = sent_cyc.pop_front();
      checks++;
      if (cyc - c != 3 || (e >= 0 && int'(w) != e)) begin
        failures++;
        if (failures < 8) $display("weight %0d expected %0d (latency %0d)", w, e, cyc - c);
      end
    end
  end

  always_ff @(posedge clk)
    if (rst_n && vin) sent_cyc.push_back(cyc);

  initial begin
    x = 0; vin = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int xi = -5 * A; xi <= 5 * A; xi++) begin
      x <= sample_t'(xi); vin <= 1;
      expq.push_back(expect_w(xi));
      @(posedge clk);
      if (xi % 97 == 0) begin vin <= 0; @(posedge clk); end
    end
    vin <= 0;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 4; k++) begin
      x <= sample_t'((2 * k - 3) * A); vin <= 1;
      expq.push_back((k % 2 == 0) ? 7 : 0);
      @(posedge clk);
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
