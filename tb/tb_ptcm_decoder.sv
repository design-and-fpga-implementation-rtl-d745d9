// tb_ptcm_decoder -- checks the pragmatic TCM decoder at both rates.
//
// Random bytes go through the TCM encoder (itself checked by
// tb_ptcm_encoder); its Fix(12,11) levels are scaled to the receiver's
// Sfix(12,9) (divide by 4), noise uniform in +-60 LSB is added (A = 162,
// so it never crosses a decision boundary on its own), and every ~50th
// symbol one axis gets an extra +-200 hit, enough to cross the coded-bit
// boundary (A away) but not the uncoded one (2A away). The Viterbi decoder
// must undo the crossings and the bytes must come out exactly as sent, in
// order. Symbols reach the decoder one per 4 cycles, as from the matched
// filter.
`timescale 1ns/1ps
module tb_ptcm_decoder;
  import dvb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  localparam int NG = 60;       // byte groups sent (3 or 7 bytes each)

  logic sym_ce;
  int   ce_cnt = 0;
  always_ff @(posedge clk) begin
    ce_cnt <= (ce_cnt == 3) ? 0 : ce_cnt + 1;
    sym_ce <= rst_n && (ce_cnt == 3);
  end

  for (genvar r = 0; r < 2; r++) begin : g_rate
    localparam bit R78 = (r == 1);
    localparam ptcm_rate_e RT = R78 ? RATE_7_8 : RATE_3_4;
    localparam int NB = R78 ? 7 : 3;
    byte_t din, dout;
    logic vin, rdy, tvout, rvin, vout;
    sample_t ti, tq, ri, rq;

    ptcm_encoder #(.RATE(RT)) u_enc (.clk, .rst_n, .din, .vin, .rdy, .sym_ce,
        .i_out(ti), .q_out(tq), .vout(tvout));
    ptcm_decoder #(.RATE(RT)) u_dec (.clk, .rst_n, .i_in(ri), .q_in(rq), .vin(rvin),
        .dout, .vout);

    byte_t sent [$];
    int nout = 0, nhits = 0, nsym = 0;

    // channel
    always_ff @(posedge clk) begin
      rvin <= tvout;
      if (tvout) begin
        int ni, nq;
        ni = $urandom_range(120) - 60;
        nq = $urandom_range(120) - 60;
        if ($urandom_range(49) == 0) begin
          nhits <= nhits + 1;
          if ($urandom_range(1)) ni += (ti < 0) ? 200 : -200;
          else                   nq += (tq < 0) ? 200 : -200;
        end
        ri <= sample_t'((ti >>> 2) + ni);
        rq <= sample_t'((tq >>> 2) + nq);
        nsym <= nsym + 1;
      end
    end

    always_ff @(posedge clk) begin
      if (rst_n && vout) begin
        checks++;
        if (nout >= sent.size() || dout != sent[nout]) begin
          failures++;
          if (failures < 6) $display("rate %0d byte %0d: %h", r, nout, dout);
        end
        nout <= nout + 1;
      end
    end

    initial begin
      vin = 0; din = 0;
      wait (rst_n);
      @(posedge clk);
      for (int n = 0; n < NG * NB; n++) begin
        byte_t b;
        b = byte_t'($urandom);
        sent.push_back(b);
        din <= b; vin <= 1;
        @(posedge clk);
        while (!rdy) @(posedge clk);
      end
      vin <= 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // enough for all groups plus the decoder latency; the bytes of the
    // last groups stay inside the decoder (nothing pushes them out)
    repeat (NG * 16 * 4 + 400) @(posedge clk);
    checks += 2;
    if (g_rate[0].nout < (NG - 20) * 3) failures++;
    if (g_rate[1].nout < (NG - 20) * 7) failures++;
    $display("bytes out %0d and %0d, channel hits %0d and %0d", g_rate[0].nout, g_rate[1].nout,
             g_rate[0].nhits, g_rate[1].nhits);
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
