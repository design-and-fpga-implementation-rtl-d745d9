// tb_dvb_modem_full -- end-to-end test of the modem exactly as its defaults
// build it (inner rate 7/8, no parameter overrides on the top).
//
// The modem is looped back through a noisy channel with impulse bursts
// (modem_harness): packets of 188 bytes go in at the transmitter's
// valid/ready port, and every message byte delivered by the receiver is
// compared with what was sent 11 codewords earlier (the interleaver pair's
// delay). Besides the byte checks the test requires that each mechanism
// happened at least once: source stalls, RS parity slots holding the
// source, channel impulses, RS corrections, Viterbi corrections of
// coded-bit hard decisions and depuncture erasures; it also checks the
// symbol strobe comes once every 4 cycles. tb_dvb_modem runs the same test
// with a rate-3/4 modem alongside.
`timescale 1ns/1ps
module tb_dvb_modem_full;
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

  // -------------------------------------------- mechanism counters (7/8)
  int par_a, erasures, vit_fixes_a, ce_count, cyc;

  // a coded bit whose hard decision (soft weight >= 4) disagrees with the
  // re-encoded bit was corrected by the Viterbi decoder; counted on the
  // symbol's I axis via the decoder's outboard inputs
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      par_a <= 0; erasures <= 0; vit_fixes_a <= 0; ce_count <= 0; cyc <= 0;
    end else begin
      cyc <= cyc + 1;
      if (a_vin && !u_dut.u_tx.u_rs.in_msg) par_a <= par_a + 1;
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
    end
  end

  int checks, failures;

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("tb_dvb_modem_full: mechanism never happened: %s", what);
    end else begin
      $display("tb_dvb_modem_full: %s: %0d", what, n);
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (a_done);
    repeat (10) @(posedge clk);
    checks   += a_checks;
    failures += a_failures;
    $display("tb_dvb_modem_full: bytes checked %0d, cycles %0d", a_checks, cyc);
    need("source stalls", a_stalls);
    need("cycles held by RS parity", par_a);
    need("channel impulses", a_imp);
    need("RS byte corrections", a_corrections);
    need("Viterbi corrections", vit_fixes_a);
    need("depuncture erasures", erasures);
    // symbol rate: one symbol strobe per 4 cycles
    checks++;
    if (ce_count < cyc / 4 - 2 || ce_count > cyc / 4 + 1) begin
      failures++;
      $display("tb_dvb_modem_full: symbol strobe count %0d for %0d cycles", ce_count, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 400000);
    $display("tb_dvb_modem_full: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
