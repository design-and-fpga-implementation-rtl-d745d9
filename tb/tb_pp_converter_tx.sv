// tb_pp_converter_tx -- checks the transmit P/P converter at both rates.
//
// Random byte groups go in (with input gaps and random step-consumer
// stalls); every output step is compared with the DVB bit-allocation
// table as written out in ptcm_ref.svh. Also checks that exactly 8 steps
// come out per group.
`timescale 1ns/1ps
module tb_pp_converter_tx;
  import dvb_pkg::*;
  `include "ptcm_ref.svh"

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  localparam int NG = 40;

  for (genvar r = 0; r < 2; r++) begin : g_rate
    localparam bit R78 = (r == 1);
    localparam int NB = R78 ? 7 : 3;
    byte_t din;
    logic vin, rdy, vout, sready;
    logic [2:0] e;
    logic [3:0] ne;
    pp_converter_tx #(.RATE(R78 ? RATE_7_8 : RATE_3_4)) dut (.clk, .rst_n, .din, .vin, .rdy,
        .e, .ne, .vout, .sready);

    byte_t grp [NG][7];
    int ostep = 0;

    always_ff @(posedge clk) sready <= ($urandom_range(2) != 0);

    always_ff @(posedge clk) begin
      if (rst_n && vout && sready) begin
        int gi, k;
        logic [2:0] ee;
        logic [3:0] en;
        gi = ostep / 8; k = ostep % 8;
        for (int b = 0; b < 3; b++) ee[b] = ref_bit(R78, b, k, grp[gi]);
        for (int b = 0; b < 4; b++) en[b] = ref_bit(R78, 3 + b, k, grp[gi]);
        checks++;
        if (e != ee || ne != en) begin
          failures++;
          if (failures < 5) $display("rate %0d step %0d: e=%b ne=%b expected %b %b", r, ostep, e, ne, ee, en);
        end
        ostep <= ostep + 1;
      end
    end

    initial begin
      vin = 0; din = 0;
      for (int gi = 0; gi < NG; gi++)
        for (int i = 0; i < 7; i++) grp[gi][i] = (i < NB) ? byte_t'($urandom) : 8'h00;
      wait (rst_n);
      @(posedge clk);
      for (int gi = 0; gi < NG; gi++)
        for (int i = 0; i < NB; i++) begin
          while ($urandom_range(3) == 0) begin vin <= 0; @(posedge clk); end
          din <= grp[gi][i]; vin <= 1;
          @(posedge clk);
          while (!rdy) @(posedge clk);
        end
      vin <= 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    checks += 2;
    if (g_rate[0].ostep != 8 * NG) failures++;
    if (g_rate[1].ostep != 8 * NG) failures++;
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
