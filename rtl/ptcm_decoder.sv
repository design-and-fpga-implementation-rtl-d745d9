// ptcm_decoder -- pragmatic TCM decoder for 16-QAM, inner rate 3/4 or 7/8
// (Zehavi-Wolf structure; the DVB standard leaves the decoder open).
//
// Data flow, one received symbol (i_in, q_in in Sfix(12,9)) per vin:
//   1. soft_decision on I and Q gives 3-bit weights of the coded bits
//      C1 and C2; depuncture turns them into Viterbi steps (rate 7/8:
//      erasures for the punctured X2 and Y3).
//   2. viterbi_decoder recovers the encoded information bits E.
//   3. The decisions are re-encoded (conv_encoder) and punctured like the
//      transmitter did, giving the coded bits C1, C2 of every symbol.
//   4. Meanwhile the raw symbol waited in a FIFO. With its coded bits
//      known, an outboard_decision per axis picks the uncoded bit
//      (U1 from I, U2 from Q).
//   5. Columns {E, NE} are rebuilt (rate 3/4: E1 = decision, NE1 = U1,
//      NE2 = U2; rate 7/8: E3..E1 = three decisions, NE4/NE3 = U2/U1 of
//      the first symbol, NE2/NE1 = U2/U1 of the second) and pp_converter_rx
//      turns them back into bytes.
//
// Timing: symbols must be at least 4 cycles apart (they come from the
// matched filter, one per 4 samples). Latency is dominated by the Viterbi
// depth: DEPTH decoder steps, i.e. DEPTH symbols at rate 3/4 and 2*DEPTH/3
// symbols at rate 7/8. The symbol FIFO holds FIFO_DEPTH symbols, which
// must exceed that.
module ptcm_decoder
  import dvb_pkg::*;
#(
  parameter ptcm_rate_e RATE  = RATE_7_8,
  parameter int DEPTH         = (RATE == RATE_7_8) ? 96 : 48,
  parameter int FIFO_DEPTH    = 128
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t i_in,
  input  sample_t q_in,
  input  logic    vin,
  output byte_t   dout,
  output logic    vout
);

  localparam int FW = $clog2(FIFO_DEPTH);

  // 1. soft decisions and depuncturing
  logic [2:0] wi, wq;
  logic       w_v, wq_v;

  soft_decision u_sd_i (.clk, .rst_n, .x(i_in), .vin, .w(wi), .vout(w_v));
  soft_decision u_sd_q (.clk, .rst_n, .x(q_in), .vin, .w(wq), .vout(wq_v));

  logic [2:0] sx, sy;
  logic       ex, ey, s_v;

  depuncture #(.RATE(RATE)) u_dep (
    .clk, .rst_n, .wi, .wq, .vin(w_v), .sx, .sy, .ex, .ey, .vout(s_v)
  );

  // 2. Viterbi decoder
  logic dec_b, dec_v;

  viterbi_decoder #(.DEPTH(DEPTH)) u_vit (
    .clk, .rst_n, .sx, .sy, .ex, .ey, .vin(s_v), .dout(dec_b), .vout(dec_v)
  );

  // 3. re-encoder; the decision travels along so it stays with its bits
  logic rx, ry, r_v, dec_b_q;

  conv_encoder u_reenc (
    .clk, .rst_n, .u(dec_b), .vin(dec_v), .x(rx), .y(ry), .vout(r_v)
  );

  always_ff @(posedge clk) if (dec_v) dec_b_q <= dec_b;

  // symbol tokens: coded bits of one symbol, decisions to attach, and
  // whether the token closes a column
  logic [1:0] bit_k;          // position of this decision in a 7/8 triple
  logic       y2_q;
  logic [1:0] e_acc;
  logic       tok_v, tok_c1, tok_c2, tok_last;
  logic [2:0] tok_e;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bit_k <= '0;
      e_acc <= '0;
      y2_q  <= 1'b0;
    end else if (r_v && RATE == RATE_7_8) begin
      bit_k <= (bit_k == 2'd2) ? 2'd0 : bit_k + 1'b1;
      e_acc <= {e_acc[0], dec_b_q};
      if (bit_k == 2'd1) y2_q <= ry;   // X2 is punctured
    end
  end

  always_comb begin
    tok_v = 1'b0; tok_c1 = 1'b0; tok_c2 = 1'b0; tok_last = 1'b0; tok_e = '0;
    if (r_v) begin
      if (RATE == RATE_3_4) begin
        tok_v = 1'b1; tok_c1 = rx; tok_c2 = ry; tok_last = 1'b1;
        tok_e = {2'b00, dec_b_q};
      end else if (bit_k == 2'd0) begin
        tok_v = 1'b1; tok_c1 = rx; tok_c2 = ry;          // X1, Y1
      end else if (bit_k == 2'd2) begin
        tok_v = 1'b1; tok_c1 = y2_q; tok_c2 = rx;        // Y2, X3
        tok_last = 1'b1;
        tok_e = {e_acc[1:0], dec_b_q};                   // E3 E2 E1
      end
    end
  end

  // 4. symbol FIFO and outboard decisions
  sample_t        fi [FIFO_DEPTH];
  sample_t        fq [FIFO_DEPTH];
  logic [FW-1:0]  wp, rp;
  sample_t        oi, oq;

  always_ff @(posedge clk) begin
    if (vin) begin
      fi[wp] <= i_in;
      fq[wp] <= q_in;
    end
  end
  assign oi = fi[rp];
  assign oq = fq[rp];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (vin)   wp <= wp + 1'b1;
      if (tok_v) rp <= rp + 1'b1;
    end
  end

  logic u1, u2, u_v, u2_v;

  outboard_decision u_ob_i (.clk, .rst_n, .x(oi), .c(tok_c1), .vin(tok_v), .u(u1), .vout(u_v));
  outboard_decision u_ob_q (.clk, .rst_n, .x(oq), .c(tok_c2), .vin(tok_v), .u(u2), .vout(u2_v));

  // token side band through the 3-cycle outboard pipeline
  logic [2:0] e_d  [3];
  logic       l_d  [3];

  always_ff @(posedge clk) begin
    e_d[0] <= tok_e;  l_d[0] <= tok_last;
    e_d[1] <= e_d[0]; l_d[1] <= l_d[0];
    e_d[2] <= e_d[1]; l_d[2] <= l_d[1];
  end

  // 5. column assembly
  logic       ua1, ua2;
  logic [2:0] col_e;
  logic [3:0] col_ne;
  logic       col_v;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ua1 <= 1'b0;
      ua2 <= 1'b0;
    end else if (u_v && !l_d[2]) begin
      ua1 <= u1;
      ua2 <= u2;
    end
  end

  always_comb begin
    col_v = u_v && l_d[2];
    col_e = e_d[2];
    if (RATE == RATE_7_8) col_ne = {ua2, ua1, u2, u1};
    else                  col_ne = {2'b00, u2, u1};
  end

  pp_converter_rx #(.RATE(RATE)) u_pp (
    .clk, .rst_n, .e(col_e), .ne(col_ne), .vin(col_v), .dout, .vout
  );

  // the I and Q paths run in lock step
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (w_v == wq_v) else $error("ptcm_decoder: I/Q soft decisions out of step");
      assert (u_v == u2_v) else $error("ptcm_decoder: I/Q outboard decisions out of step");
    end
  end

endmodule
