// depuncture -- "insert zero" block between the soft-decision units and the
// Viterbi decoder.
//
// Each received symbol gives two 3-bit soft weights, wi from the I axis
// (coded bit C1) and wq from the Q axis (C2). At rate 3/4 nothing is
// punctured and every symbol is one decoder step (X = wi, Y = wq). At rate
// 7/8 two symbols carry X1, Y1, Y2, X3 of three decoder steps; the block
// rebuilds the three steps and marks the dropped X2 and Y3 as erasures,
// which the decoder gives a zero branch-metric contribution:
//   symbol 1 -> step (X1 = wi, Y1 = wq)
//   symbol 2 -> step (X2 erased, Y2 = wi), next cycle step (X3 = wq,
//               Y3 erased)
// Symbols must be at least 2 cycles apart. The first symbol after reset is
// the first of a pair.
module depuncture
  import dvb_pkg::*;
#(
  parameter ptcm_rate_e RATE = RATE_7_8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] wi,
  input  logic [2:0] wq,
  input  logic       vin,
  output logic [2:0] sx,
  output logic [2:0] sy,
  output logic       ex,   // X erased
  output logic       ey,   // Y erased
  output logic       vout
);

  logic       second;    // next symbol is the second of a pair
  logic       pend;      // third step still to send
  logic [2:0] pend_x;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      second <= 1'b0;
      pend   <= 1'b0;
      pend_x <= '0;
      sx <= '0; sy <= '0; ex <= 1'b0; ey <= 1'b0; vout <= 1'b0;
    end else begin
      vout <= 1'b0;
      if (RATE == RATE_3_4) begin
        if (vin) begin
          sx <= wi; sy <= wq; ex <= 1'b0; ey <= 1'b0; vout <= 1'b1;
        end
      end else begin
        if (pend) begin
          sx <= pend_x; sy <= '0; ex <= 1'b0; ey <= 1'b1; vout <= 1'b1;
          pend <= 1'b0;
        end else if (vin) begin
          vout   <= 1'b1;
          second <= !second;
          if (!second) begin
            sx <= wi; sy <= wq; ex <= 1'b0; ey <= 1'b0;
          end else begin
            sx <= '0; sy <= wi; ex <= 1'b1; ey <= 1'b0;
            pend   <= 1'b1;
            pend_x <= wq;
          end
        end
      end
    end
  end

endmodule
