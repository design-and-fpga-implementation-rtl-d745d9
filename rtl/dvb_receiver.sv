// dvb_receiver -- baseband receiver of the DVB 16-QAM pragmatic-TCM modem:
// square-root raised-cosine matched filters with 4:1 decimation on I and Q
// -> pragmatic TCM decoder (soft decision, Viterbi, re-encoding, outboard
// decision) -> convolutional deinterleaver -> RS(204,188) decoder.
//
// One clock, the sample clock. Samples arrive with vin, one per cycle at
// most; everything after the matched filters runs at the symbol rate or
// slower and never stalls. Symbol timing, carrier and frame
// synchronisation are not part of the design: the receiver takes the
// transmitter's first sample after reset as its first sample, as in a
// back-to-back test. The deinterleaver's 2244-byte delay is a whole number
// of RS codewords, so the RS decoder stays codeword-aligned; the first 11
// codewords it outputs are the all-zero words that fill the interleaver
// pair.
//
// Interface: i_in/q_in in Fix(12,11) with vin; dout/vout corrected bytes,
// info high for message bytes, corrected/fail as in rs_decoder.
module dvb_receiver
  import dvb_pkg::*;
#(
  parameter ptcm_rate_e RATE = RATE_7_8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t i_in,
  input  sample_t q_in,
  input  logic    vin,
  output byte_t   dout,
  output logic    vout,
  output logic    info,
  output logic    corrected,
  output logic    fail
);

  sample_t mi, mq;
  logic    m_v, mq_v;

  matched_filter u_mf_i (.clk, .rst_n, .x(i_in), .vin, .y(mi), .vout(m_v));
  matched_filter u_mf_q (.clk, .rst_n, .x(q_in), .vin, .y(mq), .vout(mq_v));

  byte_t d_d;
  logic  d_v;

  ptcm_decoder #(.RATE(RATE)) u_dec (
    .clk, .rst_n, .i_in(mi), .q_in(mq), .vin(m_v), .dout(d_d), .vout(d_v)
  );

  byte_t di_d;
  logic  di_v, di_rdy;

  conv_interleaver #(.INVERSE(1'b1)) u_dil (
    .clk, .rst_n, .din(d_d), .vin(d_v), .rdy(di_rdy),
    .dout(di_d), .vout(di_v), .dready(1'b1)
  );

  rs_decoder u_rsd (
    .clk, .rst_n, .din(di_d), .vin(di_v), .dout, .vout, .info, .corrected, .fail
  );

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!d_v || di_rdy) else $error("dvb_receiver: deinterleaver not ready");
      assert (m_v == mq_v) else $error("dvb_receiver: I/Q matched filters out of step");
    end
  end

endmodule
