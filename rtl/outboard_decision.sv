// outboard_decision -- estimates the uncoded bit U of one axis of a
// received 16-QAM symbol, given the coded bit C rebuilt by re-encoding the
// Viterbi decisions.
//
// With C known only two points of the axis remain: -3 (U=1) and +1 (U=0)
// for C = 1, -1 (U=1) and +3 (U=0) for C = 0. The threshold is the point
// between them, -A for C = 1 and +A for C = 0 (A = 1/sqrt(10)), and U = 1
// when the sample lies below it. Two comparators and a multiplexer, as the
// document describes.
//
// Input Sfix(12,9). Pipeline of 3 cycles: input register, the two
// comparisons, the multiplexer.
module outboard_decision
  import dvb_pkg::*;
#(
  parameter int AMP = RX_AMP
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t x,
  input  logic    c,
  input  logic    vin,
  output logic    u,
  output logic    vout
);

  localparam sample_t THR = sample_t'(AMP);

  sample_t x_q;
  logic    c_q, c_q2;
  logic    lt_neg, lt_pos;
  logic [1:0] v_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_q    <= '0;
      c_q    <= 1'b0;
      c_q2   <= 1'b0;
      lt_neg <= 1'b0;
      lt_pos <= 1'b0;
      u      <= 1'b0;
      v_q    <= '0;
      vout   <= 1'b0;
    end else begin
      v_q    <= {v_q[0], vin};
      vout   <= v_q[1];
      x_q    <= x;
      c_q    <= c;
      lt_neg <= (x_q < -THR);
      lt_pos <= (x_q < THR);
      c_q2   <= c_q;
      u      <= c_q2 ? lt_neg : lt_pos;
    end
  end

endmodule
