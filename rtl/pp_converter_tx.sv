// pp_converter_tx -- transmitter parallel-to-parallel (P/P) converter of the
// pragmatic TCM encoder.
//
// It gathers a group of bytes from the interleaver, 3 for rate 3/4 (A, B, D
// in arrival order) and 7 for rate 7/8 (A, B, D, F, G, H, L), and hands the
// group out as 8 steps. Each step carries the bits of one column of the
// DVB bit-allocation table:
//   rate 3/4: E1 = A7..A0 one per step; (NE2,NE1) = (B7,B6),(B5,B4),..,
//             (D1,D0)
//   rate 7/8: (E3,E2,E1) = the 24 bits of A, F, H, three per step, most
//             significant first; (NE4..NE1) = the nibbles of B, D, G, L,
//             high nibble first.
// Bit 7 is the most significant bit of a byte and the first bit out. The
// first byte after reset is taken as byte A; there is no sync-byte search.
//
// Interface: byte input with valid/ready; step output e[2:0] = {E3,E2,E1},
// ne[3:0] = {NE4,NE3,NE2,NE1} (unused positions are 0 at rate 3/4) with
// valid/ready. A second register lets the next group be collected while the
// current one is stepped out.
module pp_converter_tx
  import dvb_pkg::*;
#(
  parameter ptcm_rate_e RATE = RATE_7_8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  byte_t      din,
  input  logic       vin,
  output logic       rdy,
  output logic [2:0] e,
  output logic [3:0] ne,
  output logic       vout,
  input  logic       sready
);

  localparam int NB = (RATE == RATE_7_8) ? 7 : 3;

  byte_t        grp [7];         // entries NB..6 unused at rate 3/4
  logic [2:0]   gcnt;
  logic         gfull;
  logic [23:0]  es;    // E bit stream, first bit in [23]
  logic [31:0]  ns;    // NE bit stream, first bit in [31]
  logic [2:0]   step;
  logic         busy;
  logic         load;

  assign rdy  = !gfull;
  assign load = gfull && (!busy || (sready && step == 3'd7));
  assign vout = busy;

  always_comb begin
    if (RATE == RATE_7_8) begin
      e  = es[23:21];
      ne = ns[31:28];
    end else begin
      e  = {2'b00, es[23]};
      ne = {2'b00, ns[31:30]};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gcnt  <= '0;
      gfull <= 1'b0;
      busy  <= 1'b0;
      step  <= '0;
      es    <= '0;
      ns    <= '0;
      for (int i = 0; i < 7; i++) grp[i] <= '0;
    end else begin
      if (vin && rdy) begin
        grp[gcnt] <= din;
        if (gcnt == 3'(NB - 1)) begin
          gcnt  <= '0;
          gfull <= 1'b1;
        end else begin
          gcnt <= gcnt + 1'b1;
        end
      end
      if (load) begin
        gfull <= 1'b0;
        busy  <= 1'b1;
        step  <= '0;
        if (RATE == RATE_7_8) begin
          es <= {grp[0], grp[3], grp[5]};
          ns <= {grp[1], grp[2], grp[4], grp[6]};
        end else begin
          es <= {grp[0], 16'h0000};
          ns <= {grp[1], grp[2], 16'h0000};
        end
      end else if (busy && sready) begin
        step <= step + 1'b1;
        if (step == 3'd7) busy <= 1'b0;
        if (RATE == RATE_7_8) begin
          es <= es << 3;
          ns <= ns << 4;
        end else begin
          es <= es << 1;
          ns <= ns << 2;
        end
      end
    end
  end

endmodule
