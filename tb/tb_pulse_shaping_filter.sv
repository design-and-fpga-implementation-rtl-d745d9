// tb_pulse_shaping_filter -- checks the polyphase SRRC interpolator.
// Random 16-QAM levels (Fix(12,11)) are fed one per 4 cycles, with an
// extra pause now and then. After each symbol the 4 output samples must
// come on the 4 following cycles, and each must be within 3 LSB of the
// real-valued zero-stuffed convolution sum_m s[n-m] h(4m + k - 14), h from
// the closed-form pulse in srrc_ref.svh. A single isolated symbol must
// reproduce the pulse shape itself, main lobe 14 samples after the symbol's
// first sample.
`timescale 1ns/1ps
module tb_pulse_shaping_filter;
  import dvb_pkg::*;
  `include "srrc_ref.svh"

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  sample_t x, y;
  logic vin, vout;
  pulse_shaping_filter dut (.clk, .rst_n, .x, .vin, .y, .vout);

  int checks = 0, failures = 0;
  real syms [$];         // symbols sent, newest last
  real expq [$];
  int  maxerr = 0;
  logic vin_q [5] = '{default: 1'b0};
  int  nout = 0;

  always_ff @(posedge clk) begin
    vin_q[0] <= vin;
    for (int i = 1; i < 5; i++) vin_q[i] <= vin_q[i-1];
    if (rst_n) begin
      // a sample is due in each of the 4 cycles after a symbol was taken
      checks++;
      if (vout != (vin_q[1] || vin_q[2] || vin_q[3] || vin_q[4])) begin
        failures++;
        $display("vout timing at sample %0d", nout);
      end
      if (vout) begin
        real e, d;
        e = expq.pop_front();
        d = y - e;
        checks++;
        if (d > 3.0 || d < -3.0) begin
          failures++;
          if (failures < 6) $display("sample %0d: %0d expected %f", nout, y, e);
        end
        if (d < 0) d = -d;
        if (int'(d) > maxerr) maxerr = int'(d);
        nout <= nout + 1;
      end
    end
  end

  task automatic send(sample_t s);
    real v;
    v = s;
    syms.push_back(v);
    for (int k = 0; k < 4; k++) begin
      real acc;
      acc = 0.0;
      for (int m = 0; m < 8; m++)
        if (m < syms.size() && 4 * m + k <= 28)
          acc += syms[syms.size() - 1 - m] * srrc_ref(4 * m + k - 14);
      expq.push_back(acc);
    end
    x <= s; vin <= 1;
    @(posedge clk);
    vin <= 0;
    repeat (3) @(posedge clk);
    if ($urandom_range(7) == 0) repeat (2) @(posedge clk);
  endtask

  initial begin
    localparam sample_t LV [4] = '{12'sh796, 12'sh287, 12'shD79, 12'sh86A};
    x = 0; vin = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 500; n++) send(LV[$urandom_range(3)]);
    // isolated pulse: flush with zeros, one symbol of 0.5, zeros again
    for (int n = 0; n < 8; n++) send(12'sh000);
    send(12'sh400);
    for (int n = 0; n < 8; n++) send(12'sh000);
    repeat (8) @(posedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    $display("largest error %0d LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
