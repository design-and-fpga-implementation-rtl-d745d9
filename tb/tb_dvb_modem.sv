// tb_dvb_modem -- end-to-end test of the modem at both inner rates.
//
// Two modems run side by side: the default one (inner rate 7/8) and one
// set to rate 3/4. Each is looped back through a noisy channel with
// impulses (modem_harness) and must deliver every packet intact. Besides
// the byte checks, the test requires that each mechanism of the design
// happened at least once: RS parity stalls of the source, channel impulses,
// RS corrections, Viterbi corrections of coded-bit hard decisions, and
// (7/8) erasures from the depuncturer.
`timescale 1ns/1ps
module tb_dvb_modem;
  import dvb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  // ---------------------------------------------------------------- 7/8
  byte_t   a_din;   logic a_vin, a_rdy;
  sample_t a_ti, a_tq; logic a_tv, a_ce;
  sample_t a_ri, a_rq; logic a_rv;
  byte_t   a_dout;  logic a_vout, a_info, a_corr, a_fail;
  int a_checks, a_failures, a_stalls, a_corrections, a_fails, a_imp;
  logic a_done;

  dvb_modem u_dut (
    .clk, .rst_n,
    .tx_din(a_din), .tx_vin(a_vin), .tx_rdy(a_rdy),
    .tx_i(a_ti), .tx_q(a_tq), .tx_vout(a_tv), .tx_ce_sym(a_ce),
    .rx_i(a_ri), .rx_q(a_rq), .rx_vin(a_rv),
    .rx_dout(a_dout), .rx_vout(a_vout), .rx_info(a_info),
    .rx_corrected(a_corr), .rx_fail(a_fail)
  );

  modem_harness u_ha (
    .clk, .rst_n,
    .tx_din(a_din), .tx_vin(a_vin), .tx_rdy(a_rdy),
    .tx_i(a_ti), .tx_q(a_tq), .tx_vout(a_tv),
    .rx_i(a_ri), .rx_q(a_rq), .rx_vin(a_rv),
    .rx_dout(a_dout), .rx_vout(a_vout), .rx_info(a_info),
    .rx_corrected(a_corr), .rx_fail(a_fail),
    .checks(a_checks), .failures(a_failures), .stalls(a_stalls),
    .corrections(a_corrections), .fails(a_fails), .impulses(a_imp), .done(a_done)
  );

  // ---------------------------------------------------------------- 3/4
  byte_t   b_din;   logic b_vin, b_rdy;
  sample_t b_ti, b_tq; logic b_tv, b_ce;
  sample_t b_ri, b_rq; logic b_rv;
  byte_t   b_dout;  logic b_vout, b_info, b_corr, b_fail;
  int b_checks, b_failures, b_stalls, b_corrections, b_fails, b_imp;
  logic b_done;

  dvb_modem #(.RATE(RATE_3_4)) u_dut34 (
    .clk, .rst_n,
    .tx_din(b_din), .tx_vin(b_vin), .tx_rdy(b_rdy),
    .tx_i(b_ti), .tx_q(b_tq), .tx_vout(b_tv), .tx_ce_sym(b_ce),
    .rx_i(b_ri), .rx_q(b_rq), .rx_vin(b_rv),
    .rx_dout(b_dout), .rx_vout(b_vout), .rx_info(b_info),
    .rx_corrected(b_corr), .rx_fail(b_fail)
  );

  modem_harness u_hb (
    .clk, .rst_n,
    .tx_din(b_din), .tx_vin(b_vin), .tx_rdy(b_rdy),
    .tx_i(b_ti), .tx_q(b_tq), .tx_vout(b_tv),
    .rx_i(b_ri), .rx_q(b_rq), .rx_vin(b_rv),
    .rx_dout(b_dout), .rx_vout(b_vout), .rx_info(b_info),
    .rx_corrected(b_corr), .rx_fail(b_fail),
    .checks(b_checks), .failures(b_failures), .stalls(b_stalls),
    .corrections(b_corrections), .fails(b_fails), .impulses(b_imp), .done(b_done)
  );

  // -------------------------------------------- mechanism counters (7/8)
  int par_a, par_b, erasures, vit_fixes_a, vit_fixes_b, ce_count, cyc;

  // a coded bit whose hard decision (soft weight >= 4) disagrees with the
  // re-encoded bit was corrected by the Viterbi decoder; counted on the
  // symbol's I axis via the decoder's outboard inputs
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      par_a <= 0; par_b <= 0; erasures <= 0; vit_fixes_a <= 0; vit_fixes_b <= 0; ce_count <= 0; cyc <= 0;
    end else begin
      cyc <= cyc + 1;
      if (a_vin && !u_dut.u_tx.u_rs.in_msg) par_a <= par_a + 1;
      if (b_vin && !u_dut34.u_tx.u_rs.in_msg) par_b <= par_b + 1;
      if (a_ce) ce_count <= ce_count + 1;
      if (u_dut.u_rx.u_dec.s_v && (u_dut.u_rx.u_dec.ex || u_dut.u_rx.u_dec.ey))
        erasures <= erasures + 1;
      if (u_dut.u_rx.u_dec.tok_v) begin
        sample_t s;
        s = u_dut.u_rx.u_dec.oi;
        // nearest-level coded bit of the I sample: C = 1 at -3 and +1
        if (((s < -324) || (s >= 0 && s < 324)) != u_dut.u_rx.u_dec.tok_c1)
          vit_fixes_a <= vit_fixes_a + 1;
      end
      if (u_dut34.u_rx.u_dec.tok_v) begin
        sample_t s;
        s = u_dut34.u_rx.u_dec.oi;
        if (((s < -324) || (s >= 0 && s < 324)) != u_dut34.u_rx.u_dec.tok_c1)
          vit_fixes_b <= vit_fixes_b + 1;
      end
    end
  end

  int checks, failures;

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("tb_dvb_modem: mechanism never happened: %s", what);
    end else begin
      $display("tb_dvb_modem: %s: %0d", what, n);
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (a_done && b_done);
    repeat (10) @(posedge clk);
    checks   += a_checks + b_checks;
    failures += a_failures + b_failures;
    $display("tb_dvb_modem: 7/8 bytes checked %0d, 3/4 bytes checked %0d, cycles %0d",
             a_checks, b_checks, cyc);
    need("7/8 source stalls", a_stalls);
    need("3/4 source stalls", b_stalls);
    need("7/8 cycles held by RS parity", par_a);
    need("3/4 cycles held by RS parity", par_b);
    need("7/8 channel impulses", a_imp);
    need("3/4 channel impulses", b_imp);
    need("7/8 RS byte corrections", a_corrections);
    need("3/4 RS byte corrections", b_corrections);
    need("7/8 Viterbi corrections", vit_fixes_a);
    need("3/4 Viterbi corrections", vit_fixes_b);
    need("7/8 depuncture erasures", erasures);
    // symbol rate: one symbol strobe per 4 cycles
    checks++;
    if (ce_count < cyc / 4 - 2 || ce_count > cyc / 4 + 1) begin
      failures++;
      $display("tb_dvb_modem: symbol strobe count %0d for %0d cycles", ce_count, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 400000);
    $display("tb_dvb_modem: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
