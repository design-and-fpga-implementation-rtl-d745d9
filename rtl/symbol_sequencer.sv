// symbol_sequencer -- puncturing and symbol sequencing of the pragmatic TCM
// encoder for 16-QAM.
//
// Each input step holds the non-encoded bits NE of one P/P column and the
// convolutional-encoder outputs produced for that column's encoded bits.
// The sequencer turns a step into 16-QAM symbols of four bits each: U1, U2
// (uncoded, select the sign half of the I and Q axes) and C1, C2 (coded, sent
// on I and Q respectively):
//   rate 3/4 (no puncturing): one symbol, C1 = X1, C2 = Y1, U1 = NE1,
//            U2 = NE2.
//   rate 7/8: the three coded pairs (X1,Y1),(X2,Y2),(X3,Y3) are punctured
//            with the rate-3/4 pattern X:101, Y:110 (X2 and Y3 dropped) and
//            the four survivors fill two symbols:
//            first  C1 = X1, C2 = Y1, U1 = NE3, U2 = NE4
//            second C1 = Y2, C2 = X3, U1 = NE1, U2 = NE2.
// This follows the DVB puncturing and sequencer tables.
//
// Interface: step input (ne, xs, ys; index 0 = first coded pair) with
// valid/ready; symbol output sym = {U2, U1, C2, C1} with valid/ready. A new
// step is taken when the last symbol of the previous one leaves, so there is
// no bubble between steps. Output is registered.
//
// xs[1] (X2) and ys[2] (Y3) are the punctured bits: they are part of the
// step so that the port carries all three coded pairs, but they are never
// sent, and a lint tool reports them as unused.
module symbol_sequencer
  import dvb_pkg::*;
#(
  parameter ptcm_rate_e RATE = RATE_7_8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] ne,
  input  logic [2:0] xs,
  input  logic [2:0] ys,
  input  logic       vin,
  output logic       rdy,
  output logic [3:0] sym,
  output logic       vout,
  input  logic       sready
);

  localparam int NSYM = (RATE == RATE_7_8) ? 2 : 1;

  logic [3:0] s1_q;     // second symbol of a 7/8 step, waiting
  logic       s1_v;

  assign rdy = (!vout || sready) && !s1_v;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sym  <= '0;
      vout <= 1'b0;
      s1_q <= '0;
      s1_v <= 1'b0;
    end else if (!vout || sready) begin
      if (s1_v) begin
        sym  <= s1_q;
        vout <= 1'b1;
        s1_v <= 1'b0;
      end else if (vin) begin
        vout <= 1'b1;
        if (NSYM == 2) begin
          sym  <= {ne[3], ne[2], ys[0], xs[0]};
          s1_q <= {ne[1], ne[0], xs[2], ys[1]};
          s1_v <= 1'b1;
        end else begin
          sym  <= {ne[1], ne[0], ys[0], xs[0]};
        end
      end else begin
        vout <= 1'b0;
      end
    end
  end

endmodule
