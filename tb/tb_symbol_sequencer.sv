// tb_symbol_sequencer -- checks puncturing and symbol sequencing at both
// rates against the DVB sequencer table:
//   3/4: U2=NE2 U1=NE1 C2=Y1 C1=X1
//   7/8: first U2=NE4 U1=NE3 C2=Y1 C1=X1, second U2=NE2 U1=NE1 C2=X3 C1=Y2
// Random steps with random input gaps and symbol-consumer stalls; checks
// every symbol, the symbol count, and that X2 and Y3 never reach a symbol
// (they are toggled freely and must not matter).
`timescale 1ns/1ps
module tb_symbol_sequencer;
  import dvb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  localparam int NS = 300;

  for (genvar r = 0; r < 2; r++) begin : g_rate
    localparam bit R78 = (r == 1);
    logic [3:0] ne, sym;
    logic [2:0] xs, ys;
    logic vin, rdy, vout, sready;
    symbol_sequencer #(.RATE(R78 ? RATE_7_8 : RATE_3_4)) dut (.clk, .rst_n, .ne, .xs, .ys,
        .vin, .rdy, .sym, .vout, .sready);

    logic [3:0] expq [$];
    int nout = 0;

    always_ff @(posedge clk) sready <= ($urandom_range(3) != 0);

    always_ff @(posedge clk) begin
      if (rst_n && vout && sready) begin
        logic [3:0] x;
        x = expq.pop_front();
        checks++;
        if (sym != x) begin
          failures++;
          if (failures < 5) $display("rate %0d symbol %0d: %b expected %b", r, nout, sym, x);
        end
        nout <= nout + 1;
      end
    end

    initial begin
      vin = 0; ne = 0; xs = 0; ys = 0;
      wait (rst_n);
      @(posedge clk);
      for (int s = 0; s < NS; s++) begin
        logic [3:0] n;
        logic [2:0] x, y;
        n = 4'($urandom); x = 3'($urandom); y = 3'($urandom);
        while ($urandom_range(3) == 0) begin vin <= 0; @(posedge clk); end
        ne <= n; xs <= x; ys <= y; vin <= 1;
        if (R78) begin
          expq.push_back({n[3], n[2], y[0], x[0]});
          expq.push_back({n[1], n[0], x[2], y[1]});
        end else begin
          expq.push_back({n[1], n[0], y[0], x[0]});
        end
        @(posedge clk);
        while (!rdy) @(posedge clk);
      end
      vin <= 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    checks += 2;
    if (g_rate[0].nout != NS) failures++;
    if (g_rate[1].nout != 2 * NS) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
