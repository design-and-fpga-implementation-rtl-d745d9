// tb_viterbi_decoder -- checks the soft-decision Viterbi decoder.
//
// Random information bits are encoded by a shift-register model of the
// K=7 171/133 code. Each coded bit becomes a 3-bit weight (0 or 7) plus
// noise of up to 2 levels towards the middle, and now and then a weight is
// flipped to the wrong side outright (7 <-> 0), never two flips within GAP
// steps. Instance 0 decodes the full rate-1/2 stream (DEPTH 48, GAP 20);
// instance 1 the rate-3/4 punctured stream of the 7/8 modem, X2 and Y3 of
// every three steps erased (DEPTH 96, GAP 40). Within these limits a
// maximum-likelihood decoder cannot err: any wrong path differs in at
// least d_free positions (10, or 5 punctured), each worth at least 7-2*2
// = 3 to the right path, and one flip takes back at most 14. So every
// decoded bit must equal the sent bit. Also checks that flips really
// happened and that bit n leaves one cycle after step n + DEPTH - 1.
`timescale 1ns/1ps
module tb_viterbi_decoder;
  import dvb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  localparam int NBITS = 3000;

  for (genvar r = 0; r < 2; r++) begin : g_inst
    localparam bit PUNCT = (r == 1);
    localparam int DEPTH = PUNCT ? 96 : 48;
    localparam int GAP   = PUNCT ? 40 : 20;
    logic [2:0] sx, sy;
    logic ex, ey, vin, dout, vout;
    viterbi_decoder #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .sx, .sy, .ex, .ey, .vin, .dout, .vout);

    logic sent [$];
    int nsteps = 0, nout = 0, nflips = 0;

    always_ff @(posedge clk) begin
      if (rst_n && vin) nsteps <= nsteps + 1;
      if (rst_n && vout) begin
        checks++;
        if (nout >= sent.size() || dout != sent[nout] || nsteps != nout + DEPTH) begin
          failures++;
          if (failures < 400) $display("inst %0d bit %0d: %b (steps %0d)", r, nout, dout, nsteps);
        end
        nout <= nout + 1;
      end
    end

    int last_flip = -1000;

    function automatic logic [2:0] weight(logic b, int k, ref int flips, ref int last);
      int w;
      if (k - last >= GAP && $urandom_range(3) == 0) begin
        flips++;
        last = k;
        return b ? 3'd0 : 3'd7;
      end
      w = $urandom_range(2);
      return b ? 3'(7 - w) : 3'(w);
    endfunction

    initial begin
      logic [6:0] sr;
      sr = '0;
      vin = 0; sx = 0; sy = 0; ex = 0; ey = 0;
      wait (rst_n);
      @(posedge clk);
      for (int k = 0; k < NBITS + DEPTH; k++) begin
        logic b, x, y;
        b = (k < NBITS) ? 1'($urandom) : 1'b0;
        sent.push_back(b);
        sr = {sr[5:0], b};
        x = sr[0] ^ sr[1] ^ sr[2] ^ sr[3] ^ sr[6];
        y = sr[0] ^ sr[2] ^ sr[3] ^ sr[5] ^ sr[6];
        ex <= PUNCT && (k % 3 == 1);
        ey <= PUNCT && (k % 3 == 2);
        sx <= (PUNCT && k % 3 == 1) ? 3'd0 : weight(x, k, nflips, last_flip);
        sy <= (PUNCT && k % 3 == 2) ? 3'd0 : weight(y, k, nflips, last_flip);
        vin <= 1;
        @(posedge clk);
        if ($urandom_range(7) == 0) begin vin <= 0; @(posedge clk); end
      end
      vin <= 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4000) @(posedge clk);
    checks += 4;
    if (g_inst[0].nout != NBITS + 1) failures++;
    if (g_inst[1].nout != NBITS + 1) failures++;
    if (g_inst[0].nflips < 20) failures++;
    if (g_inst[1].nflips < 10) failures++;
    $display("flips corrected: %0d and %0d", g_inst[0].nflips, g_inst[1].nflips);
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
