// tb_pp_converter_rx -- checks the receive P/P converter at both rates.
// Random byte groups are turned into 8 columns each using the DVB
// bit-allocation table as written out in ptcm_ref.svh; the columns are sent
// back to back (one per cycle) in one part of the run and with random gaps
// in another, and the bytes must come out in their original order.
`timescale 1ns/1ps
module tb_pp_converter_rx;
  import dvb_pkg::*;
  `include "ptcm_ref.svh"

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  localparam int NG = 60;

  for (genvar r = 0; r < 2; r++) begin : g_rate
    localparam bit R78 = (r == 1);
    localparam int NB = R78 ? 7 : 3;
    logic [2:0] e;
    logic [3:0] ne;
    logic vin, vout;
    byte_t dout;
    pp_converter_rx #(.RATE(R78 ? RATE_7_8 : RATE_3_4)) dut (.clk, .rst_n, .e, .ne, .vin,
        .dout, .vout);

    byte_t expq [$];
    int nout = 0;

    always_ff @(posedge clk) begin
      if (rst_n && vout) begin
        byte_t x;
        x = expq.pop_front();
        checks++;
        if (dout != x) begin
          failures++;
          if (failures < 5) $display("rate %0d byte %0d: %h expected %h", r, nout, dout, x);
        end
        nout <= nout + 1;
      end
    end

    initial begin
      byte_t g [7];
      vin = 0; e = 0; ne = 0;
      wait (rst_n);
      @(posedge clk);
      for (int gi = 0; gi < NG; gi++) begin
        for (int i = 0; i < 7; i++) g[i] = (i < NB) ? byte_t'($urandom) : 8'h00;
        for (int i = 0; i < NB; i++) expq.push_back(g[i]);
        for (int k = 0; k < 8; k++) begin
          logic [2:0] ee;
          logic [3:0] nn;
          for (int b = 0; b < 3; b++) ee[b] = ref_bit(R78, b, k, g);
          for (int b = 0; b < 4; b++) nn[b] = ref_bit(R78, 3 + b, k, g);
          e <= ee; ne <= nn; vin <= 1;
          @(posedge clk);
          if (gi >= NG / 2 && $urandom_range(2) == 0) begin vin <= 0; @(posedge clk); end
        end
      end
      vin <= 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (1200) @(posedge clk);
    checks += 2;
    if (g_rate[0].nout != 3 * NG) failures++;
    if (g_rate[1].nout != 7 * NG) failures++;
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
