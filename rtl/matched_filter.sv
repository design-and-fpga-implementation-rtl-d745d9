// matched_filter -- square-root raised-cosine matched filter and
// decimator for one axis (I or Q) of the receiver.
//
// Same 29-tap filter as the transmitter (roll-off 0.35, L = 4). A filter
// followed by an L:1 down-sampler only needs every L-th output, so, as in
// the polyphase decimator, the products are formed only at the kept
// instants: the samples sit in a 29-deep delay line and the full sum
// sum_j h[j] x[n-j] (the four sub-filters on their decimated input phases,
// added) is evaluated once per L input samples. The kept instants are fixed
// from reset: the first output is taken when the delay line is first full
// (sample 28, counting from 0) and then every L samples, which is the
// symbol centre when the transmitter's first sample is the receiver's
// first sample; no timing recovery is done (the document has none either).
//
// Interface: samples x in Fix(12,11) with vin; symbols y in Sfix(12,9)
// (range +-4; the transmit-receive cascade has unit gain, so the
// constellation levels come out at +-1/sqrt(10), +-3/sqrt(10)) with vout,
// one cycle after the sample that completed them.
module matched_filter
  import dvb_pkg::*;
#(
  parameter int L    = SRRC_L,
  parameter int TAPS = SRRC_TAPS
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t x,
  input  logic    vin,
  output sample_t y,
  output logic    vout
);

  localparam int PW = (L > 1) ? $clog2(L) : 1;
  localparam int CW = $clog2(TAPS + 1);
  localparam int AW = 24 + $clog2(TAPS) + 1;

  sample_t        dl [TAPS];     // dl[0] = newest sample
  logic [CW-1:0]  fill;
  logic [PW-1:0]  ph;
  logic signed [AW-1:0] acc;
  sample_t        dl_n [TAPS];

  always_comb begin
    dl_n[0] = x;
    for (int j = 1; j < TAPS; j++) dl_n[j] = dl[j-1];
    acc = '0;
    for (int j = 0; j < TAPS; j++)
      acc += AW'(signed'(dl_n[j])) * AW'(srrc_tap(j));
  end

  // Fix(12,11) * Fix(12,11) has 22 fraction bits; keep 9
  function automatic sample_t round_sat(logic signed [AW-1:0] a);
    logic signed [AW-1:0] r;
    r = (a + AW'(1 <<< 12)) >>> 13;
    if (r > AW'(2047))       return sample_t'(2047);
    else if (r < -AW'(2048)) return sample_t'(-2048);
    else                     return sample_t'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < TAPS; j++) dl[j] <= '0;
      fill <= '0;
      ph   <= '0;
      y    <= '0;
      vout <= 1'b0;
    end else begin
      vout <= 1'b0;
      if (vin) begin
        for (int j = 0; j < TAPS; j++) dl[j] <= dl_n[j];
        if (fill != CW'(TAPS - 1)) begin
          fill <= fill + 1'b1;
        end else begin
          ph <= (ph == PW'(L - 1)) ? '0 : ph + 1'b1;
          if (ph == '0) begin
            y    <= round_sat(acc);
            vout <= 1'b1;
          end
        end
      end
    end
  end

endmodule
