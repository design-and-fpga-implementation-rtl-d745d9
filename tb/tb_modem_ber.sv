// tb_modem_ber -- error performance at the operating points of the modem's
// specification: rate 3/4 at Eb/N0 = 9.0 dB and rate 7/8 at 10.7 dB, the
// points where the bit error rate before RS decoding should be at most
// 2e-4 and the output quasi error free.
//
// Each modem is looped back through white Gaussian noise added to every
// transmitted sample (modem_harness with SIGMA_MILLI). Eb is taken per
// useful bit, so with unit average symbol energy
//   N0 = 1 / (SE * 10^(EbN0/10)),  SE = 188/204 * rate * 4 bit/symbol,
// and the matched filter's output noise per axis has variance N0/2. The
// filter's squared taps sum to 1 (to within 0.1 %), so the noise per input
// sample has the same standard deviation, 2048 * sqrt(N0/2) LSB in the
// transmitter's Fix(12,11) format. The operating points and spectral
// efficiencies are the specification's; the channel model is this test's.
//
// Two more modems run at the same points with the specification's
// implementation margin (1.5 dB at 3/4, 2.1 dB at 7/8) taken off; they are
// only measured. Checks at the specified points: every delivered message
// byte is correct (quasi error free after RS), no codeword fails, and the
// byte error rate before RS (counted as RS corrections) is at most
// 8 * 2e-4. The margin-free points must show errors before RS, which
// proves the noise is applied. 200 packets per modem, about 0.5 million
// cycles.
`timescale 1ns/1ps
module tb_modem_ber;
  import dvb_pkg::*;

  localparam int NPKT = 200;

  // noise standard deviation per sample in 1/1000 LSB
  function automatic int sigma_milli(real se, real ebn0_db);
    real n0;
    n0 = 1.0 / (se * (10.0 ** (ebn0_db / 10.0)));
    return int'(1000.0 * 2048.0 * $sqrt(n0 / 2.0));
  endfunction

  // instance r: rate 3/4 for even r, 7/8 for odd r; r = 0, 1 at the
  // specified points, r = 2, 3 with the implementation margin (1.5 and
  // 2.1 dB) taken off
  localparam real EBN0 [4] = '{9.0, 10.7, 7.5, 8.6};
  localparam int SIG [4] = '{sigma_milli(2.76, 9.0), sigma_milli(3.22, 10.7),
                             sigma_milli(2.76, 7.5), sigma_milli(3.22, 8.6)};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  int checks, failures;
  int chk [4], fl [4], st [4], cor [4], fls [4], imp [4];
  logic done [4];

  for (genvar r = 0; r < 4; r++) begin : g_rate
    byte_t   din;   logic vin, rdy;
    sample_t ti, tq; logic tv, ce;
    sample_t ri, rq; logic rv;
    byte_t   dout;  logic vout, info, corr, fail;

    if (r % 2 == 1) begin : g_top
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

    modem_harness #(
      .NPKT(NPKT), .IMP_AMP(0), .NOISE(0),
      .SIGMA_MILLI(SIG[r])
    ) u_h (
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

  task automatic need(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("tb_modem_ber: fail: %s", what);
    end
  endtask

  initial begin
    int nbytes;
    checks = 0;
    failures = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    repeat (10) @(posedge clk);
    checks   += chk[0] + chk[1];
    failures += fl[0] + fl[1];   // the margin-free points are measured, not judged
    // bytes through the RS decoder: data codewords plus flush, 204 each
    nbytes = (NPKT + 11) * 204;
    for (int r = 0; r < 4; r++) begin
      $display("tb_modem_ber: rate %s at %0d.%0d dB (sigma %0d milli-LSB): %0d of %0d bytes corrected by RS (%0d ppm), %0d codewords failed, %0d message bytes wrong",
               (r % 2 == 1) ? "7/8" : "3/4", int'(EBN0[r] * 10.0) / 10, int'(EBN0[r] * 10.0) % 10,
               SIG[r], cor[r], nbytes, cor[r] * 1000 / (nbytes / 1000), fls[r], fl[r]);
    end
    for (int r = 0; r < 2; r++) begin
      need(chk[r] >= NPKT * 188, "not every message byte was checked");
      need(fls[r] == 0, "an RS codeword failed");
      need(cor[r] * 10000 <= nbytes * 16, "byte error rate before RS above 8 * 2e-4");
    end
    // the noise must matter: without the margin there are errors before RS
    need(cor[2] > 0 && cor[3] > 0, "the noise caused no errors before RS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 1000000);
    $display("tb_modem_ber: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
