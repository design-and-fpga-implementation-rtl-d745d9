// tb_conv_interleaver -- checks the convolutional interleaver and
// deinterleaver (I = 12, M = 17).
//
// A random byte stream with input gaps and output stalls goes through an
// interleaver and, directly, a deinterleaver. Each output is compared with
// a queue model: branch j of the interleaver delays its bytes by j*M visits
// of that branch, branch j of the deinterleaver by (I-1-j)*M, and cells not
// yet written read 0. The pair must return the input delayed by exactly
// I*(I-1)*M = 2244 bytes.
`timescale 1ns/1ps
module tb_conv_interleaver;
  import dvb_pkg::*;

  localparam int I = 12, M = 17;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  byte_t din, il_d, dout;
  logic  vin, rdy, il_v, il_rdy, vout, dready;

  conv_interleaver #(.INVERSE(1'b0)) u_il (.clk, .rst_n, .din, .vin, .rdy,
      .dout(il_d), .vout(il_v), .dready(il_rdy));
  conv_interleaver #(.INVERSE(1'b1)) u_dil (.clk, .rst_n, .din(il_d), .vin(il_v), .rdy(il_rdy),
      .dout, .vout, .dready);

  int checks = 0, failures = 0;
  byte_t q_il [I][$];
  byte_t q_dl [I][$];
  int br_in, br_mid;
  byte_t hist [$];
  int nin, nout;

  initial begin
    for (int j = 0; j < I; j++) begin
      repeat (j * M) q_il[j].push_back(8'h00);
      repeat ((I - 1 - j) * M) q_dl[j].push_back(8'h00);
    end
  end

  always_ff @(posedge clk) dready <= ($urandom_range(4) != 0);

  // models, advanced on the accepted handshakes
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (vin && rdy) begin
        q_il[br_in].push_back(din);
        br_in <= (br_in + 1) % I;
        hist.push_back(din);
        nin <= nin + 1;
      end
      if (il_v && il_rdy) begin
        byte_t e;
        e = q_il[br_mid].pop_front();
        checks++;
        if (il_d != e) failures++;
        q_dl[br_mid].push_back(il_d);
        br_mid <= (br_mid + 1) % I;
      end
      if (vout && dready) begin
        byte_t e;
        e = (nout < 2244) ? 8'h00 : hist[nout - 2244];
        checks++;
        if (dout != e) begin
          failures++;
          if (failures < 5) $display("pair out %0d: %02h expected %02h", nout, dout, e);
        end
        nout <= nout + 1;
      end
    end
  end

  initial begin
    br_in = 0; br_mid = 0; nin = 0; nout = 0;
    vin = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3 * 2244; n++) begin
      din <= byte_t'($urandom);
      vin <= ($urandom_range(3) != 0);
      @(posedge clk);
      while (vin && !rdy) @(posedge clk);
    end
    vin <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (nout < 2 * 2244) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
