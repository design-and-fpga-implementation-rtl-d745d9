// conv_encoder -- rate-1/2, constraint-length-7 (64-state) convolutional
// encoder, G1 = 171 octal giving X and G2 = 133 octal giving Y, the de-facto
// standard code of pragmatic TCM (free distance 10 before puncturing).
//
// One information bit u is taken per cycle in which vin is high; the two
// coded bits for it appear on x/y one cycle later with vout. The six-bit
// shift register starts at the all-zero state after reset. The same module
// is the decoder's re-encoder, which rebuilds the coded bits from the
// Viterbi decisions. Serial, one bit per cycle, as the document's
// parallel-to-serial converter feeding the encoder implies.
module conv_encoder
  import dvb_pkg::*;
#(
  parameter int K = 7
) (
  input  logic clk,
  input  logic rst_n,
  input  logic u,
  input  logic vin,
  output logic x,
  output logic y,
  output logic vout
);

  logic [K-2:0] state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= '0;
      x     <= 1'b0;
      y     <= 1'b0;
      vout  <= 1'b0;
    end else begin
      vout <= vin;
      if (vin) begin
        {x, y} <= conv_xy(state, u);
        state  <= conv_next(state, u);
      end
    end
  end

  initial assert (K == 7) else $error("conv_encoder: only K = 7 is supported");

endmodule
