// tb_modem_100k -- long-run workload: 100,000 random bytes through the
// modem at each inner rate.
//
// The top is used at its defaults for rate 7/8 and with RATE_3_4 for the
// second instance. Each modem is looped back through the same noisy
// channel with impulse bursts as in tb_dvb_modem (modem_harness); 532
// transport packets (100,016 bytes, sync byte 47h plus 187 random bytes)
// are sent, followed by flush packets, and every delivered byte is compared
// with what was sent. About 1.1 million clock cycles at rate 7/8 and 1.3
// million at 3/4; the two run in parallel.
`timescale 1ns/1ps
module tb_modem_100k;
  import dvb_pkg::*;

  localparam int NPKT = 532;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int checks, failures;
  int chk [2], fl [2], st [2], cor [2], fls [2], imp [2];
  logic done [2];

  for (genvar r = 0; r < 2; r++) begin : g_rate
    byte_t   din;   logic vin, rdy;
    sample_t ti, tq; logic tv, ce;
    sample_t ri, rq; logic rv;
    byte_t   dout;  logic vout, info, corr, fail;

    if (r == 1) begin : g_top
      dvb_modem u_dut (
        .clk, .rst_n,
        .tx_din(din), .tx_vin(vin), .tx_rdy(rdy),
        .tx_i(ti), .tx_q(tq), .tx_vout(tv), .tx_ce_sym(ce),
        .rx_i(ri), .rx_q(rq), .rx_vin(rv),
        .rx_dout(dout), .rx_vout(vout), .rx_info(info),
        .rx_corrected(corr), .rx_fail(fail)
      );
    end else begin : g_top
      dvb_modem #(.RATE(RATE_3_4)) u_dut (
        .clk, .rst_n,
        .tx_din(din), .tx_vin(vin), .tx_rdy(rdy),
        .tx_i(ti), .tx_q(tq), .tx_vout(tv), .tx_ce_sym(ce),
        .rx_i(ri), .rx_q(rq), .rx_vin(rv),
        .rx_dout(dout), .rx_vout(vout), .rx_info(info),
        .rx_corrected(corr), .rx_fail(fail)
      );
    end

    modem_harness #(.NPKT(NPKT)) u_h (
      .clk, .rst_n,
      .tx_din(din), .tx_vin(vin), .tx_rdy(rdy),
      .tx_i(ti), .tx_q(tq), .tx_vout(tv),
      .rx_i(ri), .rx_q(rq), .rx_vin(rv),
      .rx_dout(dout), .rx_vout(vout), .rx_info(info),
      .rx_corrected(corr), .rx_fail(fail),
      .checks(chk[r]), .failures(fl[r]), .stalls(st[r]),
      .corrections(cor[r]), .fails(fls[r]), .impulses(imp[r]), .done(done[r])
    );
  end

  initial begin
    checks = 0;
    failures = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1]);
    repeat (10) @(posedge clk);
    checks   = chk[0] + chk[1] + 2;
    failures = fl[0] + fl[1];
    // every message byte of the 532 packets must have been checked
    if (chk[0] < NPKT * 188) failures++;
    if (chk[1] < NPKT * 188) failures++;
    $display("tb_modem_100k: bytes checked 3/4 %0d, 7/8 %0d; RS corrections %0d, %0d; impulses %0d, %0d",
             chk[0], chk[1], cor[0], cor[1], imp[0], imp[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 2000000);
    $display("tb_modem_100k: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
