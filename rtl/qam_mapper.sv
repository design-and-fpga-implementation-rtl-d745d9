// qam_mapper -- 16-QAM bit mapping of one axis (in-phase or quadrature).
//
// The uncoded bit U picks the half of the axis (U = 0 positive) and the
// coded bit C the point inside it, so that points sharing a coded bit are
// two levels apart and the outboard decision needs only one threshold:
//   (U,C) = (0,0) -> +3, (0,1) -> +1, (1,0) -> -1, (1,1) -> -3
// in units of 1/sqrt(10) (unit average symbol energy), coded as Fix(12,11):
// 0x796, 0x287, 0xD79, 0x86A. The level assignment and the 12-bit codes
// are the document's; the same mapper serves both axes.
//
// Interface: u, c with vin; level out one cycle later with vout.
module qam_mapper
  import dvb_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    u,
  input  logic    c,
  input  logic    vin,
  output sample_t level,
  output logic    vout
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      level <= '0;
      vout  <= 1'b0;
    end else begin
      vout <= vin;
      if (vin) begin
        unique case ({u, c})
          2'b00:   level <= QAM_P3;
          2'b01:   level <= QAM_P1;
          2'b10:   level <= QAM_M1;
          default: level <= QAM_M3;
        endcase
      end
    end
  end

endmodule
