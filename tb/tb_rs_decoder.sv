// tb_rs_decoder -- checks the RS(204,188) decoder.
//
// The testbench encodes random packets itself (g(x) and GF(256) arithmetic
// rebuilt here from log/antilog tables), adds e byte errors at random
// distinct positions with random non-zero values, and sends the codewords
// back to back at one byte every 2 cycles. Frames with e = 0..8 errors must
// come out exactly as encoded, with e corrected pulses, no fail pulse and
// info high for the first 188 bytes only. Frames with 10 and 16 errors are
// beyond the code and must raise fail. The first output byte must follow
// the last input byte of its codeword by 20 cycles.
`timescale 1ns/1ps
module tb_rs_decoder;
  import dvb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  byte_t din, dout;
  logic  vin, vout, info, corrected, fail;

  rs_decoder dut (.clk, .rst_n, .din, .vin, .dout, .vout, .info, .corrected, .fail);

  localparam int NF = 13;
  localparam int NERR [NF] = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 8, 10, 16, 0};

  int checks = 0, failures = 0;
  int    lg [256];
  byte_t al [512];
  byte_t g [17];
  byte_t cw  [NF][204];
  int    last_in [NF];
  int    cyc = 0;

  function automatic byte_t mul(byte_t a, byte_t b);
    if (a == 0 || b == 0) return 0;
    return al[lg[a] + lg[b]];
  endfunction

  always_ff @(posedge clk) cyc <= cyc + 1;

  // cycle of the last input byte of each codeword
  int ifr = 0, iidx = 0;
  always_ff @(posedge clk) begin
    if (rst_n && vin) begin
      if (iidx == 203) begin
        last_in[ifr] <= cyc;
        ifr  <= ifr + 1;
        iidx <= 0;
      end else begin
        iidx <= iidx + 1;
      end
    end
  end

  // output checker
  int ofr = 0, oidx = 0, ncorr = 0, nfail = 0, first_out;
  always_ff @(posedge clk) begin
    if (rst_n && vout && ofr < NF) begin
      if (oidx == 0) begin
        checks++;
        if (cyc - last_in[ofr] != 20) begin
          failures++;
          $display("frame %0d latency %0d", ofr, cyc - last_in[ofr]);
        end
      end
      ncorr = ncorr + int'(corrected);
      nfail = nfail + int'(fail);
      if (NERR[ofr] <= 8) begin
        checks++;
        if (dout != cw[ofr][oidx] || info != (oidx < 188)) failures++;
      end
      if (oidx == 203) begin
        checks++;
        if (NERR[ofr] <= 8) begin
          if (ncorr != NERR[ofr] || nfail != 0) begin
            failures++;
            $display("frame %0d: %0d errors, %0d corrected, fail %0d", ofr, NERR[ofr], ncorr, nfail);
          end
        end else if (nfail != 1) begin
          failures++;
          $display("frame %0d: %0d errors not flagged", ofr, NERR[ofr]);
        end
        ncorr = 0; nfail = 0; oidx = 0; ofr++;
      end else begin
        oidx++;
      end
    end
  end

  initial begin
    int x;
    byte_t r [204];
    x = 1;
    for (int i = 0; i < 510; i++) begin
      al[i] = byte_t'(x);
      if (i < 255) lg[x] = i;
      x = x << 1;
      if (x & 256) x ^= 'h11D;
    end
    // g(x) = prod (x + a^i), g[k] = coefficient of x^k
    g = '{default: 0};
    g[0] = 1;
    for (int i = 0; i < 16; i++)
      for (int k = 16; k >= 0; k--)
        g[k] = mul(g[k], al[i]) ^ ((k > 0) ? g[k-1] : 8'h00);
    for (int f = 0; f < NF; f++) begin
      byte_t rem [16];
      int pos [$];
      rem = '{default: 0};
      for (int i = 0; i < 188; i++) begin
        byte_t fb;
        cw[f][i] = (i == 0) ? 8'h47 : byte_t'($urandom);
        fb = cw[f][i] ^ rem[15];
        for (int k = 15; k > 0; k--) rem[k] = rem[k-1] ^ mul(fb, g[k]);
        rem[0] = mul(fb, g[0]);
      end
      for (int k = 0; k < 16; k++) cw[f][188+k] = rem[15-k];
    end
    din = 0; vin = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      int pos [$];
      pos.delete();
      r = cw[f];
      while (pos.size() < NERR[f]) begin
        int p;
        p = $urandom_range(203);
        if (!(p inside {pos})) pos.push_back(p);
      end
      foreach (pos[k]) r[pos[k]] ^= byte_t'($urandom_range(255, 1));
      for (int i = 0; i < 204; i++) begin
        din <= r[i]; vin <= 1;
        @(posedge clk);
        vin <= 0;
        @(posedge clk);
      end
    end
    repeat (300) @(posedge clk);
    checks++;
    if (ofr != NF) begin
      failures++;
      $display("%0d frames out", ofr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
