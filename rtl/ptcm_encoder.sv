// ptcm_encoder -- pragmatic trellis-coded modulation encoder, 16-QAM,
// inner rate 3/4 or 7/8 (DVB).
//
// Chain: P/P converter (pp_converter_tx) -> parallel-to-serial converter
// -> K=7 rate-1/2 convolutional encoder -> puncturing and symbol sequencer
// -> two 16-QAM axis mappers. At rate 3/4 each P/P column carries one
// encoded bit, coded without puncturing, plus two uncoded bits: one symbol
// per column, 8 symbols per 3 bytes. At rate 7/8 each column carries three
// encoded bits, which the P/S converter feeds to the encoder one per cycle
// (E3 first); puncturing to rate 3/4 leaves four coded bits that, with four
// uncoded bits, form two symbols: 16 symbols per 7 bytes.
//
// Timing: a single clock. Symbols leave one per sym_ce strobe (the symbol
// clock enable from clk_driver) whenever one is ready; the byte input is
// throttled with rdy, so the upstream blocks run exactly as fast as the
// symbol rate needs. The document instead spaces each block's input with
// fixed clock-enable ratios; this valid/ready form is a choice of this
// design. Unlike the document's 7/8 encoder, which presents the two
// symbols of a column side by side, both rates here emit one symbol at a
// time on a single I/Q pair.
//
// Interface: din/vin/rdy byte input; i_out, q_out (Fix(12,11)) with vout,
// one cycle after the sym_ce that released the symbol.
//
// The Q mapper's vout is left unused on purpose: both mappers are driven
// by the same strobe, so the I mapper's vout stands for both.
module ptcm_encoder
  import dvb_pkg::*;
#(
  parameter ptcm_rate_e RATE = RATE_7_8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  byte_t   din,
  input  logic    vin,
  output logic    rdy,
  input  logic    sym_ce,
  output sample_t i_out,
  output sample_t q_out,
  output logic    vout
);

  localparam int NE_BITS = (RATE == RATE_7_8) ? 3 : 1;  // encoded bits per column

  // P/P converter
  logic [2:0] pp_e;
  logic [3:0] pp_ne;
  logic       pp_v, pp_rdy;

  pp_converter_tx #(.RATE(RATE)) u_pp (
    .clk, .rst_n, .din, .vin, .rdy,
    .e(pp_e), .ne(pp_ne), .vout(pp_v), .sready(pp_rdy)
  );

  // P/S converter and convolutional encoder
  typedef enum logic [1:0] {PS_IDLE, PS_FEED, PS_HOLD} ps_state_e;
  ps_state_e  ps;
  logic [2:0] e_q;
  logic [3:0] ne_q;
  logic [1:0] feed_k, got_k;
  logic [2:0] xs_q, ys_q;
  logic       enc_u, enc_v, enc_x, enc_y, enc_vo;
  logic       seq_rdy;

  assign pp_rdy = (ps == PS_IDLE);
  assign enc_v  = (ps == PS_FEED);
  assign enc_u  = e_q[2'(NE_BITS - 1) - feed_k];

  conv_encoder u_cenc (
    .clk, .rst_n, .u(enc_u), .vin(enc_v), .x(enc_x), .y(enc_y), .vout(enc_vo)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ps     <= PS_IDLE;
      e_q    <= '0;
      ne_q   <= '0;
      feed_k <= '0;
      got_k  <= '0;
      xs_q   <= '0;
      ys_q   <= '0;
    end else begin
      if (enc_vo) begin
        xs_q[got_k] <= enc_x;
        ys_q[got_k] <= enc_y;
        got_k       <= got_k + 1'b1;
      end
      unique case (ps)
        PS_IDLE: if (pp_v) begin
          e_q    <= pp_e;
          ne_q   <= pp_ne;
          feed_k <= '0;
          got_k  <= '0;
          ps     <= PS_FEED;
        end
        PS_FEED: begin
          feed_k <= feed_k + 1'b1;
          if (feed_k == 2'(NE_BITS - 1)) ps <= PS_HOLD;
        end
        default: if (got_k == 2'(NE_BITS) && seq_rdy) ps <= PS_IDLE;
      endcase
    end
  end

  // puncturing and symbol sequencer
  logic [3:0] sym;
  logic       sym_v;

  symbol_sequencer #(.RATE(RATE)) u_seq (
    .clk, .rst_n, .ne(ne_q), .xs(xs_q), .ys(ys_q),
    .vin(ps == PS_HOLD && got_k == 2'(NE_BITS)), .rdy(seq_rdy),
    .sym, .vout(sym_v), .sready(sym_ce)
  );

  // 16-QAM mapping: I carries (U1, C1), Q carries (U2, C2)
  logic q_vout;

  qam_mapper u_map_i (
    .clk, .rst_n, .u(sym[2]), .c(sym[0]), .vin(sym_v && sym_ce),
    .level(i_out), .vout
  );
  qam_mapper u_map_q (
    .clk, .rst_n, .u(sym[3]), .c(sym[1]), .vin(sym_v && sym_ce),
    .level(q_out), .vout(q_vout)
  );

endmodule
