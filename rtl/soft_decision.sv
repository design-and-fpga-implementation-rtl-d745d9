// soft_decision -- 3-bit soft-decision weight of the coded bit carried by
// one axis of a received 16-QAM symbol.
//
// Along one axis the points -3, -1, +1, +3 (units of A = 1/sqrt(10)) carry
// the coded bit C = 1, 0, 1, 0. Each of the three spans between
// neighbouring points is cut into 8 equal bins by 7 thresholds, 21
// comparators in all. The count T of thresholds below the sample gives the
// weight: 7 - T on [-3,-1], T - 7 on [-1,+1] and 21 - T on [+1,+3], so
// weight 7 means "surely C = 1" (at -3 and +1) and weight 0 "surely C = 0"
// (at -1 and +3); samples beyond the outer points saturate. The 21
// thresholds and the 8 levels are the document's; bin edges placed evenly
// are this design's reading of its figure.
//
// Input format Sfix(12,9) (the matched-filter output), A given by the
// parameter AMP in the same units. Pipeline of 3 cycles: input
// register, comparator count, weight.
module soft_decision
  import dvb_pkg::*;
#(
  parameter int AMP = RX_AMP   // 1/sqrt(10) in Sfix(12,9) LSBs
) (
  input  logic       clk,
  input  logic       rst_n,
  input  sample_t    x,
  input  logic       vin,
  output logic [2:0] w,
  output logic       vout
);

  // threshold n = 0..20: A * (-3 + 2*(n/7) + (n%7 + 1)/4), rounded
  function automatic int thr(int n);
    return rdiv(AMP * (-12 + 8 * (n / 7) + (n % 7 + 1)), 4);
  endfunction

  sample_t    x_q;
  logic [4:0] t_q;
  logic [1:0] v_q;
  logic [4:0] t_c;

  always_comb begin
    t_c = '0;
    for (int n = 0; n < 21; n++)
      if (32'(signed'(x_q)) > thr(n)) t_c = t_c + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_q  <= '0;
      t_q  <= '0;
      w    <= '0;
      v_q  <= '0;
      vout <= 1'b0;
    end else begin
      v_q  <= {v_q[0], vin};
      vout <= v_q[1];
      if (vin) x_q <= x;
      t_q <= t_c;
      if (t_q <= 5'd7)       w <= 3'(5'd7 - t_q);
      else if (t_q <= 5'd14) w <= 3'(t_q - 5'd7);
      else                   w <= 3'(5'd21 - t_q);
    end
  end

endmodule
