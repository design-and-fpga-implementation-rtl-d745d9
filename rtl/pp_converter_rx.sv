// pp_converter_rx -- receiver parallel-to-parallel converter, the inverse
// of pp_converter_tx.
//
// It takes 8 decoded columns, each holding the encoded bits E (1 at rate
// 3/4, E3 E2 E1 at rate 7/8) recovered by the Viterbi decoder and the
// non-encoded bits NE (NE2 NE1, or NE4..NE1) recovered by the outboard
// decisions, and rebuilds the 3 or 7 bytes of the group in their original
// order (A B D, or A B D F G H L), most significant bit first, following
// the DVB bit-allocation table. The bytes of a finished group leave one per
// cycle while the next group's columns are gathered; since a group has 8
// columns and at most 7 bytes, columns may arrive as often as every cycle.
//
// Interface: e[2:0] = {E3,E2,E1}, ne[3:0] = {NE4..NE1} with vin; dout with
// vout.
//
// The E and NE buffers are shift registers whose top bits would only
// matter after a ninth column; bytes are read after the eighth, so lint
// tools report those top bits (and, at rate 3/4, all but the low 8 and 16
// bits) as unused.
module pp_converter_rx
  import dvb_pkg::*;
#(
  parameter ptcm_rate_e RATE = RATE_7_8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] e,
  input  logic [3:0] ne,
  input  logic       vin,
  output byte_t      dout,
  output logic       vout
);

  localparam int NB = (RATE == RATE_7_8) ? 7 : 3;

  logic [23:0] es;
  logic [31:0] ns;
  logic [2:0]  col;
  byte_t       ob [7];          // entries NB..6 unused at rate 3/4
  logic [2:0]  ocnt;        // bytes still to send
  logic [2:0]  oidx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      es <= '0; ns <= '0; col <= '0;
      ocnt <= '0; oidx <= '0;
      dout <= '0; vout <= 1'b0;
      for (int i = 0; i < 7; i++) ob[i] <= '0;
    end else begin
      vout <= 1'b0;
      if (ocnt != '0) begin
        dout <= ob[oidx];
        vout <= 1'b1;
        oidx <= oidx + 1'b1;
        ocnt <= ocnt - 1'b1;
      end
      if (vin) begin
        logic [23:0] es_n;
        logic [31:0] ns_n;
        if (RATE == RATE_7_8) begin
          es_n = {es[20:0], e};
          ns_n = {ns[27:0], ne};
        end else begin
          es_n = {es[22:0], e[0]};
          ns_n = {ns[29:0], ne[1:0]};
        end
        es  <= es_n;
        ns  <= ns_n;
        col <= col + 1'b1;
        if (col == 3'd7) begin
          if (RATE == RATE_7_8) begin
            ob[0] <= es_n[23:16];  // A
            ob[1] <= ns_n[31:24];  // B
            ob[2] <= ns_n[23:16];  // D
            ob[3] <= es_n[15:8];   // F
            ob[4] <= ns_n[15:8];   // G
            ob[5] <= es_n[7:0];    // H
            ob[6] <= ns_n[7:0];    // L
          end else begin
            ob[0] <= es_n[7:0];    // A
            ob[1] <= ns_n[15:8];   // B
            ob[2] <= ns_n[7:0];    // D
          end
          ocnt <= 3'(NB);
          oidx <= '0;
        end
      end
    end
  end

endmodule
