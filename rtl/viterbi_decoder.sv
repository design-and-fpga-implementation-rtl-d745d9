// viterbi_decoder -- soft-decision Viterbi decoder for the 64-state, rate
// 1/2, K = 7 code (G1 = 171 -> X, G2 = 133 -> Y), with erasures for
// punctured positions.
//
// One trellis step per cycle in which vin is high, all 64 add-compare-
// select units working in parallel. Inputs are 3-bit soft weights, 7 = "1"
// with full confidence and 0 = "0"; the branch metric of an expected bit b
// is the weight's distance to b (w for b = 0, 7 - w for b = 1), and an
// erased position contributes 0. Path metrics are kept small by subtracting
// the smallest one each step. Survivors are kept by register exchange:
// every state holds the last DEPTH decisions of its path, and the oldest
// decision of the best state is the output. The decoder starts in state 0,
// matching the encoder's reset.
//
// Timing: bit k (the k-th information bit) leaves with vout one cycle after
// step k + DEPTH - 1 was taken, so the latency is DEPTH steps. The document
// uses a vendor core whose traceback length it does not state, only that
// the punctured rate uses a longer one; DEPTH is therefore a parameter.
module viterbi_decoder
  import dvb_pkg::*;
#(
  parameter int DEPTH = 96,
  parameter int MW    = 10      // path-metric width
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] sx,
  input  logic [2:0] sy,
  input  logic       ex,
  input  logic       ey,
  input  logic       vin,
  output logic       dout,
  output logic       vout
);

  localparam int NS = 64;

  typedef logic [MW-1:0]    metric_t;
  typedef logic [DEPTH-1:0] path_t;

  metric_t pm [NS];
  path_t   sp [NS];
  logic [$clog2(DEPTH+1)-1:0] fill;

  metric_t pm_n [NS];
  path_t   sp_n [NS];
  metric_t best_m;
  logic [5:0] best_s;

  function automatic metric_t bm(logic [1:0] xy);
    metric_t m;
    m = '0;
    if (!ex) m += xy[1] ? metric_t'(3'(~sx)) : metric_t'(sx);
    if (!ey) m += xy[0] ? metric_t'(3'(~sy)) : metric_t'(sy);
    return m;
  endfunction

  always_comb begin
    best_m = '1;
    best_s = '0;
    for (int n = 0; n < NS; n++) begin
      logic [5:0] p0, p1;
      logic       u;
      metric_t    m0, m1;
      u  = n[5];
      p0 = {n[4:0], 1'b0};
      p1 = {n[4:0], 1'b1};
      m0 = pm[p0] + bm(conv_xy(p0, u));
      m1 = pm[p1] + bm(conv_xy(p1, u));
      if (m1 < m0) begin
        pm_n[n] = m1;
        sp_n[n] = {sp[p1][DEPTH-2:0], u};
      end else begin
        pm_n[n] = m0;
        sp_n[n] = {sp[p0][DEPTH-2:0], u};
      end
      if (pm_n[n] < best_m) begin
        best_m = pm_n[n];
        best_s = 6'(n);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < NS; n++) begin
        pm[n] <= (n == 0) ? '0 : metric_t'(64);
        sp[n] <= '0;
      end
      fill <= '0;
      dout <= 1'b0;
      vout <= 1'b0;
    end else begin
      vout <= 1'b0;
      if (vin) begin
        for (int n = 0; n < NS; n++) begin
          pm[n] <= pm_n[n] - best_m;
          sp[n] <= sp_n[n];
        end
        if (fill != ($bits(fill))'(DEPTH)) fill <= fill + 1'b1;
        if (fill >= ($bits(fill))'(DEPTH - 1)) begin
          dout <= sp_n[best_s][DEPTH-1];
          vout <= 1'b1;
        end
      end
    end
  end

endmodule
