// conv_interleaver -- Forney convolutional byte interleaver / deinterleaver.
//
// I branches are visited cyclically, one byte per branch. Branch j is a FIFO
// of j*M bytes in the interleaver (INVERSE = 0) and of (I-1-j)*M bytes in
// the deinterleaver (INVERSE = 1); with the DVB values I = 12, M = 17 a
// 204-byte RS codeword is spread over 12*17 branch visits and the end-to-end
// delay of the pair is I*(I-1)*M = 2244 bytes, a whole number of codewords,
// so codeword boundaries survive the pair unchanged. Both commutators start
// at branch 0 after reset, which is how input and output switches stay
// synchronised without a sync search.
//
// All FIFOs share one memory of M*I*(I-1)/2 bytes (1122 for DVB), each
// branch owning a window with its own circular pointer; a cell is read and
// rewritten in the same visit. Cells never written since reset read as 0
// (one "wrapped" flag per branch), so the memory itself needs no reset.
//
// Interface: valid/ready, registered output (one cycle latency plus the
// branch delay). dready is the downstream ready; tie it high when the
// consumer cannot stall.
module conv_interleaver
  import dvb_pkg::*;
#(
  parameter int I       = 12,
  parameter int M       = 17,
  parameter bit INVERSE = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  byte_t din,
  input  logic  vin,
  output logic  rdy,
  output byte_t dout,
  output logic  vout,
  input  logic  dready
);

  localparam int CELLS = M * I * (I - 1) / 2;
  localparam int AW    = $clog2(CELLS);
  localparam int BW    = $clog2(I);
  localparam int PW    = $clog2(M * (I - 1) + 1);

  function automatic int depth(int j);
    return INVERSE ? (I - 1 - j) * M : j * M;
  endfunction

  // start of branch j's window: sum of the depths of branches 0..j-1
  function automatic int base(int j);
    int s;
    s = 0;
    for (int k = 0; k < j; k++) s += depth(k);
    return s;
  endfunction

  byte_t          mem [CELLS];
  logic [PW-1:0]  ptr [I];
  logic [I-1:0]   wrapped;
  logic [BW-1:0]  br;
  logic           adv;
  logic [AW-1:0]  addr;
  logic [PW-1:0]  dep;

  assign adv = !vout || dready;
  assign rdy = adv;

  always_comb begin
    addr = '0;
    dep  = '0;
    for (int j = 0; j < I; j++) begin
      if (br == BW'(j)) begin
        addr = AW'(base(j)) + AW'(ptr[j]);
        dep  = PW'(depth(j));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (adv && vin && dep != '0) mem[addr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      br      <= '0;
      wrapped <= '0;
      vout    <= 1'b0;
      dout    <= '0;
      for (int j = 0; j < I; j++) ptr[j] <= '0;
    end else if (adv) begin
      vout <= vin;
      if (vin) begin
        if (dep == '0)          dout <= din;
        else if (wrapped[br])   dout <= mem[addr];
        else                    dout <= '0;
        if (dep != '0) begin
          if (ptr[br] == dep - 1'b1) begin
            ptr[br]     <= '0;
            wrapped[br] <= 1'b1;
          end else begin
            ptr[br] <= ptr[br] + 1'b1;
          end
        end
        br <= (br == BW'(I - 1)) ? '0 : br + 1'b1;
      end
    end
  end

endmodule
