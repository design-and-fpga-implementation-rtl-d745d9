// clk_driver -- clock-enable generator.
//
// The modem is multi-rate (bytes, symbols and filter samples all move at
// different rates) but runs from one system clock; each slower rate is a
// one-cycle clock-enable strobe every DIV[n] cycles, made by a free-running
// counter per output. The defaults, 1/3, 1/8 and 1/24 of the clock, are the
// three strobes of the document's clock driver for the rate-3/4 TCM encoder;
// the modem top uses one output with DIV = 4, the symbol strobe that feeds
// the 4x-oversampling pulse-shaping filters.
//
// DIV[n] is output n's divisor (DIV[0] in the low 16 bits).
//
// Interface: clr restarts all counters (the first strobe of output n comes
// DIV[n] cycles after clr is released); ce[n] is high for one cycle out of
// DIV[n].
module clk_driver #(
  parameter int                   NCE = 3,
  parameter logic [NCE-1:0][15:0] DIV = {16'd24, 16'd8, 16'd3}
) (
  input  logic           clk,
  input  logic           clr,
  output logic [NCE-1:0] ce
);

  localparam int CW = 16;

  logic [CW-1:0] cnt [NCE];

  always_ff @(posedge clk) begin
    for (int n = 0; n < NCE; n++) begin
      if (clr) begin
        cnt[n] <= '0;
        ce[n]  <= 1'b0;
      end else begin
        ce[n]  <= (cnt[n] == CW'(DIV[n] - 1));
        cnt[n] <= (cnt[n] == CW'(DIV[n] - 1)) ? '0 : cnt[n] + 1'b1;
      end
    end
  end

  initial for (int n = 0; n < NCE; n++)
    assert (DIV[n] != '0) else $error("clk_driver: bad divisor");

endmodule
