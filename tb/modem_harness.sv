// modem_harness -- stimulus, channel and checker for one dvb_modem
// instance (used by tb_dvb_modem).
//
// Source: MPEG-2-like packets of 188 bytes (sync byte 47h, then random
// bytes), sent back to back through the transmitter's valid/ready port.
// The first NPKT packets are remembered; NFLUSH more push them through the
// interleaver pair and the decoder pipelines.
// Channel: each transmitted sample gets small uniform noise (NOISE) and,
// if SIGMA_MILLI is set, white Gaussian noise; every
// IMP_PERIOD samples an impulse of IMP_AMP is added to one I sample, which
// corrupts a few symbols and so exercises the Viterbi decoder, the
// deinterleaver's burst spreading and the RS decoder.
// Checker: the receiver's first 11 codewords are the interleaver fill and
// must decode to zero; after that every message byte must equal the byte
// sent 11 codewords earlier.
module modem_harness
  import dvb_pkg::*;
#(
  parameter int NPKT       = 4,
  parameter int NFLUSH     = 12,
  parameter int IMP_PERIOD = 2500,
  parameter int IMP_AMP    = 1800,
  parameter int IMP_LEN    = 8,
  parameter int NOISE      = 24,
  parameter int SIGMA_MILLI = 0     // Gaussian noise, std. dev. in 1/1000 LSB
) (
  input  logic    clk,
  input  logic    rst_n,
  output byte_t   tx_din,
  output logic    tx_vin,
  input  logic    tx_rdy,
  input  sample_t tx_i,
  input  sample_t tx_q,
  input  logic    tx_vout,
  output sample_t rx_i,
  output sample_t rx_q,
  output logic    rx_vin,
  input  byte_t   rx_dout,
  input  logic    rx_vout,
  input  logic    rx_info,
  input  logic    rx_corrected,
  input  logic    rx_fail,
  output int      checks,
  output int      failures,
  output int      stalls,
  output int      corrections,
  output int      fails,
  output int      impulses,
  output logic    done
);

  localparam int FILL = 11;   // codewords in the interleaver pair

  byte_t exp_q [$];
  int    pkt, pos;
  int    out_cw, out_pos;
  int    samples;

  function automatic byte_t pkt_byte(int p, int i);
    return (i == 0) ? 8'h47 : byte_t'($urandom);
  endfunction

  // source (plain always: it shares the expected-byte queue with the checker)
  always @(posedge clk) begin
    if (!rst_n) begin
      tx_vin <= 1'b0;
      tx_din <= '0;
      pkt    <= 0;
      pos    <= 0;
      stalls <= 0;
    end else begin
      if (!tx_vin || tx_rdy) begin
        if (pkt < NPKT + NFLUSH) begin
          byte_t b;
          b = pkt_byte(pkt, pos);
          tx_din <= b;
          tx_vin <= 1'b1;
          if (pkt < NPKT) exp_q.push_back(b);
          if (pos == 187) begin pos <= 0; pkt <= pkt + 1; end
          else pos <= pos + 1;
        end else begin
          tx_vin <= 1'b0;
        end
      end
      if (tx_vin && !tx_rdy) stalls <= stalls + 1;
    end
  end

  // channel
  function automatic sample_t sat(int v);
    return (v > 2047) ? sample_t'(2047) : (v < -2048) ? sample_t'(-2048) : sample_t'(v);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_vin  <= 1'b0;
      rx_i    <= '0;
      rx_q    <= '0;
      samples <= 0;
      impulses <= 0;
    end else begin
      rx_vin <= tx_vout;
      if (tx_vout) begin
        int ni, nq, imp;
        ni  = int'($urandom_range(2 * NOISE)) - NOISE;
        nq  = int'($urandom_range(2 * NOISE)) - NOISE;
        if (SIGMA_MILLI > 0) begin
          // Box-Muller: two independent Gaussian samples from two uniforms
          real u1, u2, r;
          u1 = (real'($urandom_range(999999)) + 1.0) / 1000000.0;
          u2 = real'($urandom_range(999999)) / 1000000.0;
          r  = $sqrt(-2.0 * $ln(u1)) * real'(SIGMA_MILLI) / 1000.0;
          ni = ni + int'(r * $cos(6.283185307 * u2));
          nq = nq + int'(r * $sin(6.283185307 * u2));
        end
        imp = 0;
        if (samples % IMP_PERIOD >= IMP_PERIOD - IMP_LEN) begin
          imp = ($urandom_range(1) == 0) ? IMP_AMP : -IMP_AMP;
          if (samples % IMP_PERIOD == IMP_PERIOD - 1) impulses <= impulses + 1;
        end
        rx_i    <= sat(int'(tx_i) + ni + imp);
        rx_q    <= sat(int'(tx_q) + nq - imp);
        samples <= samples + 1;
      end
    end
  end

  // checker
  always @(posedge clk) begin
    if (!rst_n) begin
      out_cw  <= 0;
      out_pos <= 0;
      checks  <= 0;
      failures <= 0;
      corrections <= 0;
      fails <= 0;
      done <= 1'b0;
    end else begin
      if (rx_corrected) corrections <= corrections + 1;
      if (rx_fail) begin
        fails <= fails + 1;
        failures <= failures + 1;
        $display("modem_harness: RS decoder failure in codeword %0d", out_cw);
      end
      if (rx_vout) begin
        if (rx_info) begin
          byte_t e;
          if (out_cw < FILL) e = 8'h00;
          else if (exp_q.size() > 0) e = exp_q.pop_front();
          else e = rx_dout;
          if (out_cw < FILL + NPKT) begin
            checks <= checks + 1;
            if (rx_dout !== e) begin
              failures <= failures + 1;
              if (failures < 10)
                $display("modem_harness: codeword %0d byte %0d got %02h expected %02h",
                         out_cw, out_pos, rx_dout, e);
            end
          end
        end
        if (out_pos == 203) begin
          out_pos <= 0;
          out_cw  <= out_cw + 1;
          if (out_cw + 1 == FILL + NPKT) done <= 1'b1;
        end else begin
          out_pos <= out_pos + 1;
        end
      end
    end
  end

endmodule
