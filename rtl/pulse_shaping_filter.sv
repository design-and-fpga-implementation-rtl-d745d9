// pulse_shaping_filter -- square-root raised-cosine interpolator for one
// axis (I or Q) of the transmitter, polyphase form.
//
// The filter has roll-off 0.35, L = 4 samples per symbol and a span of 7
// symbols: 29 taps h[0..28], symmetric about h[14], with the document's
// coefficient values rounded to Fix(12,11). Instead of up-sampling by
// stuffing three zeros and running a 29-tap filter at the sample rate, the
// taps are split into the four sub-filters E_k[m] = h[4m + k] (8, 7, 7 and
// 7 taps) that all read the same 8-symbol delay line: after each input
// symbol the four sub-filter outputs are sent one per cycle, k = 0..3, which
// is the output of the zero-stuffed filter. Only one sub-filter is
// evaluated per cycle, so 8 multipliers serve all four.
//
// Interface: symbols x in Fix(12,11) with vin, at least L cycles apart (one
// per symbol clock enable). Output y in Fix(12,11), rounded and saturated,
// one sample per cycle in the L cycles after the symbol was taken, with
// vout. Latency: the first sample of a symbol leaves 1 cycle after it is
// taken; the symbol's main lobe (h[14]) appears 14 samples later.
module pulse_shaping_filter
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

  localparam int NM = (TAPS + L - 1) / L;          // taps of the longest sub-filter
  localparam int PW = (L > 1) ? $clog2(L) : 1;
  localparam int AW = 24 + $clog2(NM) + 1;

  sample_t        dl [NM];       // dl[0] = newest symbol
  logic [PW-1:0]  ph;
  logic           busy;
  logic signed [AW-1:0] acc;

  function automatic int coef(int j);
    return (j < TAPS) ? srrc_tap(j) : 0;
  endfunction

  always_comb begin
    acc = '0;
    for (int k = 0; k < L; k++) begin
      if (ph == PW'(k)) begin
        for (int m = 0; m < NM; m++)
          acc += AW'(signed'(dl[m])) * AW'(coef(m * L + k));
      end
    end
  end

  function automatic sample_t round_sat(logic signed [AW-1:0] a);
    logic signed [AW-1:0] r;
    r = (a + AW'(1 <<< 10)) >>> 11;
    if (r > AW'(2047))       return sample_t'(2047);
    else if (r < -AW'(2048)) return sample_t'(-2048);
    else                     return sample_t'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int m = 0; m < NM; m++) dl[m] <= '0;
      ph   <= '0;
      busy <= 1'b0;
      y    <= '0;
      vout <= 1'b0;
    end else begin
      vout <= busy;
      if (busy) begin
        y  <= round_sat(acc);
        ph <= ph + 1'b1;
        if (ph == PW'(L - 1)) busy <= 1'b0;
      end
      if (vin) begin
        dl[0] <= x;
        for (int m = 1; m < NM; m++) dl[m] <= dl[m-1];
        ph   <= '0;
        busy <= 1'b1;
      end
    end
  end

endmodule
