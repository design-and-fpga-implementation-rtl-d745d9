// tb_rs_encoder -- checks the RS(204,188) encoder.
//
// Three frames of random bytes go in with random input gaps and random
// downstream stalls. Each 204-byte output codeword must start with the 188
// message bytes and must be a codeword: c(a^j) = 0 for j = 0..15, computed
// here with log/antilog tables built from p(x) independently of the
// design's GF functions. rfd must drop for exactly 16 byte slots per frame.
`timescale 1ns/1ps
module tb_rs_encoder;
  import dvb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  byte_t din, dout;
  logic  vin, rfd, vout, dready;

  rs_encoder dut (.clk, .rst_n, .din, .vin, .rfd, .dout, .vout, .dready);

  int checks = 0, failures = 0;
  byte_t sent [$];
  byte_t got  [$];
  int    exp_log [256];
  byte_t alog [512];

  function automatic byte_t mul(byte_t a, byte_t b);
    if (a == 0 || b == 0) return 0;
    return alog[exp_log[a] + exp_log[b]];
  endfunction

  initial begin
    int x;
    x = 1;
    for (int i = 0; i < 510; i++) begin
      alog[i] = byte_t'(x);
      if (i < 255) exp_log[x] = i;
      x = x << 1;
      if (x & 256) x ^= 'h11D;
    end
  end

  // downstream
  always_ff @(posedge clk) begin
    dready <= ($urandom_range(3) != 0);
    if (rst_n && vout && dready) got.push_back(dout);
  end

  int rfd_low_slots;
  always_ff @(posedge clk)
    if (rst_n && !rfd && dready && vout && dut.cnt >= 8'(188)) rfd_low_slots <= rfd_low_slots + 1;

  initial begin
    vin = 0; din = 0; rfd_low_slots = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int i = 0; i < 188; i++) begin
        byte_t b;
        b = (i == 0) ? 8'h47 : byte_t'($urandom);
        while ($urandom_range(2) == 0) begin vin <= 0; @(posedge clk); end
        din <= b; vin <= 1;
        @(posedge clk);
        while (!rfd) @(posedge clk);
        sent.push_back(b);
      end
    end
    vin <= 0;
    repeat (400) @(posedge clk);
    checks++;
    if (got.size() != 3 * 204) begin
      failures++;
      $display("output length %0d", got.size());
    end else begin
      for (int f = 0; f < 3; f++) begin
        for (int i = 0; i < 188; i++) begin
          checks++;
          if (got[f*204+i] != sent[f*188+i]) failures++;
        end
        for (int j = 0; j < 16; j++) begin
          byte_t s;
          s = 0;
          for (int i = 0; i < 204; i++) s = mul(s, alog[j]) ^ got[f*204+i];
          checks++;
          if (s != 0) begin
            failures++;
            $display("frame %0d syndrome %0d = %02h", f, j, s);
          end
        end
      end
    end
    checks++;
    if (rfd_low_slots != 3 * 16) begin
      failures++;
      $display("parity slots %0d, expected 48", rfd_low_slots);
    end
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
