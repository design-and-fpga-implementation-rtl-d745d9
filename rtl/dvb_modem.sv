// dvb_modem -- top level of the DVB 16-QAM pragmatic-TCM baseband modem:
// transmitter and receiver side by side, with the channel left outside so
// that a test bench (or an RF front end) closes the loop.
//
// Transmit path: RS(204,188) -> convolutional interleaver (12 x 17) ->
// pragmatic TCM encoder, 16-QAM at inner rate 3/4 or 7/8 -> SRRC pulse
// shaping (roll-off 0.35, 4x). Receive path: SRRC matched filtering and
// decimation -> pragmatic TCM decoder (soft-decision Viterbi, re-encoding,
// outboard decision) -> deinterleaver -> RS decoder. RATE picks the inner
// code for both halves; the document builds the two rates as two separate
// modems, and 7/8 is the default here.
//
// One clock for everything, the 4x sample clock; all slower rates are clock
// enables. Ports: tx_* the transmitter (bytes in, I/Q samples out), rx_* the
// receiver (I/Q samples in, bytes out). See dvb_transmitter and
// dvb_receiver for the rates and formats.
module dvb_modem
  import dvb_pkg::*;
#(
  parameter ptcm_rate_e RATE = RATE_7_8
) (
  input  logic    clk,
  input  logic    rst_n,
  // transmitter
  input  byte_t   tx_din,
  input  logic    tx_vin,
  output logic    tx_rdy,
  output sample_t tx_i,
  output sample_t tx_q,
  output logic    tx_vout,
  output logic    tx_ce_sym,
  // receiver
  input  sample_t rx_i,
  input  sample_t rx_q,
  input  logic    rx_vin,
  output byte_t   rx_dout,
  output logic    rx_vout,
  output logic    rx_info,
  output logic    rx_corrected,
  output logic    rx_fail
);

  dvb_transmitter #(.RATE(RATE)) u_tx (
    .clk, .rst_n, .din(tx_din), .vin(tx_vin), .rdy(tx_rdy),
    .i_out(tx_i), .q_out(tx_q), .vout(tx_vout), .ce_sym(tx_ce_sym)
  );

  dvb_receiver #(.RATE(RATE)) u_rx (
    .clk, .rst_n, .i_in(rx_i), .q_in(rx_q), .vin(rx_vin),
    .dout(rx_dout), .vout(rx_vout), .info(rx_info),
    .corrected(rx_corrected), .fail(rx_fail)
  );

endmodule
