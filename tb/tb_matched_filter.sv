// tb_matched_filter -- checks the SRRC matched filter and 4:1 decimator.
// Random Fix(12,11) samples go in, one per cycle with random gaps. The
// first symbol must come with the 29th sample and one every 4 samples
// after it, one cycle after the sample that completes it, and each must be
// within 3 LSB (Sfix(12,9)) of the real-valued sum_j h(j - 14) x[n - j],
// h from the closed-form pulse in srrc_ref.svh. Then the filter is checked
// as the transmitter's partner: a stream of 16-QAM symbols, up-sampled by
// zero stuffing and shaped with the same reference pulse in the testbench,
// must come back at the +-1/sqrt(10), +-3/sqrt(10) levels (+-162, +-486)
// within 12 LSB once the filter is full (the cascade is a Nyquist pulse
// with unit gain at the symbol centre).
`timescale 1ns/1ps
module tb_matched_filter;
  import dvb_pkg::*;
  `include "srrc_ref.svh"

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  sample_t x, y;
  logic vin, vout;
  matched_filter dut (.clk, .rst_n, .x, .vin, .y, .vout);

  int checks = 0, failures = 0;
  real xs [$];
  real expq [$];
  int  tol [$];
  int  lvq [$];          // expected constellation level, or NOLVL
  int  maxisi = 0;
  localparam int NOLVL = -99999;
  int  nin = 0, nout = 0, maxerr = 0;
  logic vin_q;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      vin_q <= vin;
      checks++;
      if (vout && !vin_q) begin
        failures++;
        $display("output not right after a sample");
      end
      if (vout) begin
        real e, d;
        int t, lv;
        e = expq.pop_front();
        t = tol.pop_front();
        lv = lvq.pop_front();
        if (lv != NOLVL) begin
          int di;
          di = y - lv;
          if (di < 0) di = -di;
          if (di > maxisi) maxisi = di;
          checks++;
          if (di > 12) begin
            failures++;
            $display("level %0d expected about %0d", y, lv);
          end
        end
        d = y - e;
        checks++;
        if (d > t || d < -t) begin
          failures++;
          if (failures < 60) $display("symbol %0d: %0d expected %f", nout, y, e);
        end
        if (d < 0) d = -d;
        if (int'(d) > maxerr) maxerr = int'(d);
        nout <= nout + 1;
      end
    end
  end

  task automatic send(sample_t s, int tl, int lvl);
    real v;
    v = s;
    xs.push_back(v / 2048.0);
    if (nin >= 28 && (nin - 28) % 4 == 0) begin
      real acc;
      acc = 0.0;
      for (int j = 0; j < 29; j++) acc += xs[nin - j] * srrc_ref(j - 14);
      expq.push_back(acc * 512.0);
      tol.push_back(tl);
      lvq.push_back(lvl);
    end
    nin++;
    if ($urandom_range(3) == 0) begin
      vin <= 0;
      @(posedge clk);
    end
    x <= s; vin <= 1;
    @(posedge clk);
  endtask

  initial begin
    localparam int LV [4] = '{3, 1, -1, -3};
    real tx [$];
    int  sym [$];
    x = 0; vin = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // part 1: random samples
    for (int n = 0; n < 400; n++) send(sample_t'($urandom_range(1600) - 800), 3, NOLVL);
    // part 2: 100 QAM symbols, zero stuffed and shaped with the reference
    // pulse as the transmitter does it, Fix(12,11)
    for (int s = 0; s < 100; s++) sym.push_back(LV[$urandom_range(3)]);
    for (int n = 0; n < 400 + 28; n++) begin
      real acc;
      acc = 0.0;
      for (int s = 0; s < 100; s++)
        if (n - 4 * s >= 0 && n - 4 * s <= 28) acc += sym[s] / $sqrt(10.0) * srrc_ref(n - 4 * s - 14);
      tx.push_back(acc);
    end
    // align the symbol phase: part 1 left nin at 400, a kept instant
    for (int n = 0; n < 400 + 28; n++) begin
      real v;
      v = tx[n] * 2048.0;
      send(sample_t'($rtoi(v + ((v >= 0) ? 0.5 : -0.5))), 3,
           (n >= 28 && n % 4 == 0 && (n - 28) / 4 < 100) ? sym[(n - 28) / 4] * 162 : NOLVL);
    end
    vin <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    $display("largest error %0d LSB, largest distance from a level %0d LSB", maxerr, maxisi);
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
