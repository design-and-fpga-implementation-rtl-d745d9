// dvb_transmitter -- baseband transmitter of the DVB 16-QAM pragmatic-TCM
// modem: RS(204,188) encoder -> convolutional interleaver (I = 12, M = 17)
// -> pragmatic TCM encoder (rate 3/4 or 7/8) -> square-root raised-cosine
// pulse shaping (roll-off 0.35, 4 samples per symbol) on I and Q.
//
// One clock, the sample clock of the pulse-shaping filters (the document's
// 4X clock). A clk_driver strobe every 4 cycles releases one symbol, so the
// output is one sample per cycle once the pipeline is running. The byte
// side runs as fast as the symbols need it: each block's ready travels back
// to rdy, and the RS encoder's parity slots hold the source as well.
// Net byte rate: 3 bytes per 32 cycles at rate 3/4, 7 per 64 at rate 7/8
// (188/204 of it payload).
//
// Interface: din/vin/rdy byte input (MPEG-2 transport packets of 188
// bytes, sync byte first, back to back); i_out/q_out in Fix(12,11) with
// vout. ce_sym is the symbol strobe, brought out for monitoring.
//
// The Q filter's vout (q_v) is left unused on purpose: both filters take the
// same symbol strobe, so the I filter's vout stands for both.
module dvb_transmitter
  import dvb_pkg::*;
#(
  parameter ptcm_rate_e RATE = RATE_7_8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  byte_t   din,
  input  logic    vin,
  output logic    rdy,
  output sample_t i_out,
  output sample_t q_out,
  output logic    vout,
  output logic    ce_sym
);

  logic [0:0] ce;

  clk_driver #(.NCE(1), .DIV(16'(SRRC_L))) u_clk (.clk, .clr(!rst_n), .ce);
  assign ce_sym = ce[0];

  byte_t rs_d;
  logic  rs_v, il_rdy;

  rs_encoder u_rs (
    .clk, .rst_n, .din, .vin, .rfd(rdy), .dout(rs_d), .vout(rs_v), .dready(il_rdy)
  );

  byte_t il_d;
  logic  il_v, enc_rdy;

  conv_interleaver #(.INVERSE(1'b0)) u_il (
    .clk, .rst_n, .din(rs_d), .vin(rs_v), .rdy(il_rdy),
    .dout(il_d), .vout(il_v), .dready(enc_rdy)
  );

  sample_t si, sq;
  logic    s_v;

  ptcm_encoder #(.RATE(RATE)) u_enc (
    .clk, .rst_n, .din(il_d), .vin(il_v), .rdy(enc_rdy), .sym_ce(ce[0]),
    .i_out(si), .q_out(sq), .vout(s_v)
  );

  logic q_v;

  pulse_shaping_filter u_psf_i (.clk, .rst_n, .x(si), .vin(s_v), .y(i_out), .vout);
  pulse_shaping_filter u_psf_q (.clk, .rst_n, .x(sq), .vin(s_v), .y(q_out), .vout(q_v));

endmodule
