// tb_ptcm_encoder -- checks the complete pragmatic TCM encoder at both
// rates against the reference model in ptcm_ref.svh (bit-allocation table,
// shift-register convolutional encoder, puncturing/sequencer table and
// axis levels). Random bytes are offered with random gaps; the symbol
// strobe comes every 4 cycles. Checks every I/Q level, that each symbol
// appears exactly one cycle after a strobe, and that once running no
// strobe goes unused (the byte path keeps up with the symbol rate).
`timescale 1ns/1ps
module tb_ptcm_encoder;
  import dvb_pkg::*;
  `include "ptcm_ref.svh"

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  localparam int NG = 30;

  logic sym_ce;
  int   ce_cnt = 0;
  always_ff @(posedge clk) begin
    ce_cnt <= (ce_cnt == 3) ? 0 : ce_cnt + 1;
    sym_ce <= rst_n && (ce_cnt == 3);
  end

  for (genvar r = 0; r < 2; r++) begin : g_rate
    localparam bit R78 = (r == 1);
    localparam int NB = R78 ? 7 : 3;
    byte_t din;
    logic vin, rdy, vout, ce_q;
    sample_t i_out, q_out;
    ptcm_encoder #(.RATE(R78 ? RATE_7_8 : RATE_3_4)) dut (.clk, .rst_n, .din, .vin, .rdy,
        .sym_ce, .i_out, .q_out, .vout);

    logic [3:0] expq [$];
    int nout = 0, missed = 0;

    always_ff @(posedge clk) begin
      ce_q <= sym_ce;
      if (rst_n && vout) begin
        logic [3:0] s;
        s = expq.pop_front();
        checks++;
        if (!ce_q || i_out != ref_level(s[2], s[0]) || q_out != ref_level(s[3], s[1])) begin
          failures++;
          if (failures < 5) $display("rate %0d symbol %0d: I %h Q %h, expected sym %b", r, nout, i_out, q_out, s);
        end
        nout <= nout + 1;
      end
      // a strobe one cycle ago that produced nothing, after the first
      // symbol and while input remains
      if (rst_n && ce_q && !vout && nout > 0 && expq.size() > 16) missed <= missed + 1;
    end

    initial begin
      logic [6:0] sr;
      byte_t g [7];
      sr = '0;
      vin = 0; din = 0;
      wait (rst_n);
      @(posedge clk);
      for (int gi = 0; gi < NG; gi++) begin
        for (int i = 0; i < 7; i++) g[i] = (i < NB) ? byte_t'($urandom) : 8'h00;
        ref_symbols(R78, g, sr, expq);
        for (int i = 0; i < NB; i++) begin
          if ($urandom_range(5) == 0) begin vin <= 0; @(posedge clk); end
          din <= g[i]; vin <= 1;
          @(posedge clk);
          while (!rdy) @(posedge clk);
        end
      end
      vin <= 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2400) @(posedge clk);
    checks += 4;
    if (g_rate[0].nout != 8 * NG)  failures++;
    if (g_rate[1].nout != 16 * NG) failures++;
    if (g_rate[0].missed != 0 || g_rate[1].missed != 0) begin
      failures += 2;
      $display("unused strobes %0d %0d", g_rate[0].missed, g_rate[1].missed);
    end
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
