// rs_encoder -- systematic shortened Reed-Solomon RS(204,188), t = 8.
//
// The code is the RS(255,239) code over GF(256) with 51 leading zero bytes
// left out: field polynomial x^8+x^4+x^3+x^2+1, generator
// g(x) = prod_{i=0}^{15} (x + a^i), a = 02h (both fixed by the DVB
// standard). The 188 message bytes of a frame (an MPEG-2 transport packet,
// sync byte first) pass straight through while a 16-stage GF(256) LFSR
// divides them by g(x); the 16 remainder bytes then follow as parity,
// highest power first, giving the 204-byte codeword.
//
// Interface: valid/ready on both sides. rfd ("ready for data") is the input
// ready and, as in the document, stays low for the 16 parity slots of each
// frame. dready is the downstream ready, which the document does not have;
// it lets the following blocks pace the encoder. Output is registered: a
// byte accepted in cycle t appears on dout in cycle t+1.
module rs_encoder
  import dvb_pkg::*;
#(
  parameter int N = 204,
  parameter int K = 188
) (
  input  logic  clk,
  input  logic  rst_n,
  input  byte_t din,
  input  logic  vin,
  output logic  rfd,
  output byte_t dout,
  output logic  vout,
  input  logic  dready
);

  localparam rs_gen_t G = rs_gen();
  localparam int CW = $clog2(N + 1);

  byte_t         par [RS_2T];
  logic [CW-1:0] cnt;          // bytes of the current codeword already sent
  logic          adv;
  logic          in_msg;
  byte_t         fb;

  assign adv    = !vout || dready;
  assign in_msg = (cnt < CW'(K));
  assign rfd    = in_msg && adv;
  assign fb     = din ^ par[RS_2T-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      vout <= 1'b0;
      dout <= '0;
      for (int i = 0; i < RS_2T; i++) par[i] <= '0;
    end else if (adv) begin
      if (in_msg) begin
        vout <= vin;
        if (vin) begin
          dout <= din;
          cnt  <= cnt + 1'b1;
          par[0] <= gf_mul(fb, G[0]);
          for (int i = 1; i < RS_2T; i++) par[i] <= par[i-1] ^ gf_mul(fb, G[i]);
        end
      end else begin
        vout <= 1'b1;
        dout <= par[RS_2T-1];
        for (int i = 1; i < RS_2T; i++) par[i] <= par[i-1];
        par[0] <= '0;
        cnt <= (cnt == CW'(N - 1)) ? '0 : cnt + 1'b1;
      end
    end
  end

endmodule
