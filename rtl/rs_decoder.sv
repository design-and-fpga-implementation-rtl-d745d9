// rs_decoder -- RS(204,188), t = 8 decoder over GF(256) (the code of
// rs_encoder): corrects up to 8 byte errors anywhere in a 204-byte codeword.
//
// Stages, one codeword at a time:
//   1. Syndromes: while the codeword arrives, S_j = r(a^j), j = 0..15, by
//      Horner's rule, and the bytes are stored in one of two frame
//      buffers.
//   2. Berlekamp-Massey: 16 iterations, one per cycle, give the error
//      locator Lambda(x); then the evaluator Omega(x) = S(x)Lambda(x) mod x^16.
//   3. Chien search with Forney's formula: for byte i (power 203-i) the
//      engine evaluates z = a^-(203-i); Lambda(z) = 0 marks an error, whose
//      value (first root a^0) is Omega(z) / Lambda_odd(z). The corrected
//      bytes stream out one per cycle.
// The document uses a vendor core here and gives only its function and
// control pins; this structure is the textbook one.
//
// Interface: din/vin, bytes of consecutive codewords, first byte after
// reset starts a codeword. At most one byte every 2 cycles, so that a
// codeword is corrected (20 + 204 cycles) before its buffer is reused.
// dout/vout: the 204 corrected bytes, info high for the 188 message bytes
// and low for the 16 parity bytes (as the document's info pin). corrected
// pulses with a byte that was changed; fail pulses with the last byte of a
// codeword whose error count exceeded the code's power (the number of
// locator roots found differs from its degree). Latency from the last byte
// of a codeword to its first output byte: 20 cycles (1 syndrome
// hand-over, 16 BM, 1 Omega, 1 Chien set-up, 1 output register).
module rs_decoder
  import dvb_pkg::*;
#(
  parameter int N = 204,
  parameter int K = 188
) (
  input  logic  clk,
  input  logic  rst_n,
  input  byte_t din,
  input  logic  vin,
  output byte_t dout,
  output logic  vout,
  output logic  info,
  output logic  corrected,
  output logic  fail
);

  localparam int T2 = N - K;               // 16
  localparam int CW = $clog2(N + 1);
  localparam int SH = 255 - (N - 1);       // z for byte 0 is a^SH

  typedef byte_t poly_t [T2+1];
  typedef byte_t cst_t  [T2+1];

  function automatic cst_t pow_tab(int step);
    cst_t t;
    for (int k = 0; k <= T2; k++) t[k] = gf_alpha_pow((step * k) % 255);
    return t;
  endfunction

  localparam cst_t AK  = pow_tab(1);      // a^k
  localparam cst_t AKS = pow_tab(SH);     // a^(SH*k)

  // ------------------------------------------------ 1. input and syndromes
  byte_t         fbuf [2][N];
  logic          wbank;
  logic [CW-1:0] wcnt;
  byte_t         syn [T2];
  logic          frame_done;

  always_ff @(posedge clk) begin
    if (vin) fbuf[wbank][wcnt] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbank      <= 1'b0;
      wcnt       <= '0;
      frame_done <= 1'b0;
      for (int j = 0; j < T2; j++) syn[j] <= '0;
    end else begin
      frame_done <= 1'b0;
      if (vin) begin
        for (int j = 0; j < T2; j++)
          syn[j] <= ((wcnt == '0) ? 8'h00 : gf_mul(syn[j], AK[j])) ^ din;
        if (wcnt == CW'(N - 1)) begin
          wcnt       <= '0;
          wbank      <= !wbank;
          frame_done <= 1'b1;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------ 2. Berlekamp-Massey
  typedef enum logic [1:0] {ST_IDLE, ST_BM, ST_OMEGA, ST_CHIEN} st_e;
  st_e           st;
  byte_t         s_q [T2];
  poly_t         lam, bpl;
  byte_t         binv;
  logic [4:0]    llen;
  logic [4:0]    it;
  logic          rbank;

  byte_t         disc;
  poly_t         lam_upd;

  always_comb begin
    disc = '0;
    for (int i = 0; i <= T2; i++)
      if (i <= int'(it)) disc ^= gf_mul(lam[i], s_q[int'(it) - i]);
    for (int i = 0; i <= T2; i++)
      lam_upd[i] = lam[i] ^ ((i == 0) ? 8'h00 : gf_mul(gf_mul(disc, binv), bpl[i-1]));
  end

  // ------------------------------------------------ 3. Chien and Forney
  poly_t         lt, ot;             // Lambda_k z^k, Omega_k z^k
  logic [CW-1:0] rcnt;
  logic [4:0]    nroots;
  byte_t         ev, od, om, errv;
  logic          is_root;

  always_comb begin
    ev = '0; od = '0; om = '0;
    for (int k = 0; k <= T2; k++) begin
      if (k % 2 == 0) ev ^= lt[k];
      else            od ^= lt[k];
      if (k < T2) om ^= ot[k];
    end
    is_root = ((ev ^ od) == 8'h00);
    errv    = is_root ? gf_mul(om, gf_inv(od)) : 8'h00;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= ST_IDLE;
      it <= '0;
      llen <= '0;
      binv <= 8'h01;
      rbank <= 1'b0;
      rcnt <= '0;
      nroots <= '0;
      dout <= '0; vout <= 1'b0; info <= 1'b0; corrected <= 1'b0; fail <= 1'b0;
      for (int k = 0; k <= T2; k++) begin
        lam[k] <= '0; bpl[k] <= '0; lt[k] <= '0; ot[k] <= '0;
      end
      for (int j = 0; j < T2; j++) s_q[j] <= '0;
    end else begin
      vout <= 1'b0; corrected <= 1'b0; fail <= 1'b0; info <= 1'b0;
      unique case (st)
        ST_IDLE: if (frame_done) begin
          for (int j = 0; j < T2; j++) s_q[j] <= syn[j];
          for (int k = 0; k <= T2; k++) begin
            lam[k] <= (k == 0) ? 8'h01 : 8'h00;
            bpl[k] <= (k == 0) ? 8'h01 : 8'h00;
          end
          binv  <= 8'h01;
          llen  <= '0;
          it    <= '0;
          rbank <= !wbank;           // bank just filled
          st    <= ST_BM;
        end
        ST_BM: begin
          lam <= lam_upd;
          if (disc != 8'h00 && (5'(2) * llen) <= it) begin
            bpl  <= lam;
            llen <= it + 1'b1 - llen;
            binv <= gf_inv(disc);
          end else begin
            bpl[0] <= 8'h00;
            for (int k = 1; k <= T2; k++) bpl[k] <= bpl[k-1];
          end
          it <= it + 1'b1;
          if (it == 5'(T2 - 1)) st <= ST_OMEGA;
        end
        ST_OMEGA: begin
          for (int k = 0; k <= T2; k++) begin
            byte_t o;
            o = '0;
            for (int i = 0; i <= T2; i++)
              if (i <= k && k < T2) o ^= gf_mul(lam[i], s_q[k - i]);
            ot[k] <= gf_mul(o, AKS[k]);
            lt[k] <= gf_mul(lam[k], AKS[k]);
          end
          rcnt   <= '0;
          nroots <= '0;
          st     <= ST_CHIEN;
        end
        default: begin   // ST_CHIEN
          dout      <= fbuf[rbank][rcnt] ^ errv;
          vout      <= 1'b1;
          info      <= (rcnt < CW'(K));
          corrected <= is_root;
          if (is_root) nroots <= nroots + 1'b1;
          for (int k = 0; k <= T2; k++) begin
            lt[k] <= gf_mul(lt[k], AK[k]);
            ot[k] <= gf_mul(ot[k], AK[k]);
          end
          rcnt <= rcnt + 1'b1;
          if (rcnt == CW'(N - 1)) begin
            fail <= ((nroots + 5'(is_root)) != llen);
            st   <= ST_IDLE;
          end
        end
      endcase
    end
  end

  // a codeword finished while the previous one is still being corrected:
  // the input ran faster than one byte every 2 cycles
  a_rate: assert property (@(posedge clk) disable iff (!rst_n) !(frame_done && st != ST_IDLE))
    else $error("rs_decoder: input too fast");

endmodule
