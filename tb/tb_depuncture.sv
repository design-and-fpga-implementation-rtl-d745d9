// tb_depuncture -- checks the erasure-insertion block at both rates.
// Random weight pairs arrive 2 to 4 cycles apart. Rate 3/4: each symbol
// must give one step (X = wi, Y = wq) without erasures. Rate 7/8: symbol
// pairs (a, b) must give the steps (X1=a.wi, Y1=a.wq), (X2 erased,
// Y2=b.wi), (X3=b.wq, Y3 erased), in that order; an erased position is
// checked only for its flag.
`timescale 1ns/1ps
module tb_depuncture;
  import dvb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  localparam int NSYM = 400;

  typedef struct packed {logic [2:0] x, y; logic ex, ey;} step_t;

  for (genvar r = 0; r < 2; r++) begin : g_rate
    localparam bit R78 = (r == 1);
    logic [2:0] wi, wq, sx, sy;
    logic vin, ex, ey, vout;
    depuncture #(.RATE(R78 ? RATE_7_8 : RATE_3_4)) dut (.clk, .rst_n, .wi, .wq, .vin,
        .sx, .sy, .ex, .ey, .vout);

    step_t expq [$];
    int nout = 0;

    always_ff @(posedge clk) begin
      if (rst_n && vout) begin
        step_t e;
        e = expq.pop_front();
        checks++;
        if (ex != e.ex || ey != e.ey || (!e.ex && sx != e.x) || (!e.ey && sy != e.y)) begin
          failures++;
          if (failures < 5) $display("rate %0d step %0d: %0d/%b %0d/%b", r, nout, sx, ex, sy, ey);
        end
        nout <= nout + 1;
      end
    end

    initial begin
      logic [2:0] ai, aq;
      vin = 0; wi = 0; wq = 0;
      wait (rst_n);
      @(posedge clk);
      for (int s = 0; s < NSYM; s++) begin
        logic [2:0] i, q;
        i = 3'($urandom); q = 3'($urandom);
        wi <= i; wq <= q; vin <= 1;
        if (!R78) expq.push_back('{x: i, y: q, ex: 0, ey: 0});
        else if (s % 2 == 0) expq.push_back('{x: i, y: q, ex: 0, ey: 0});
        else begin
          expq.push_back('{x: 0, y: i, ex: 1, ey: 0});
          expq.push_back('{x: q, y: 0, ex: 0, ey: 1});
        end
        @(posedge clk);
        vin <= 0;
        repeat ($urandom_range(3, 1)) @(posedge clk);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) @(posedge clk);
    checks += 2;
    if (g_rate[0].nout != NSYM) failures++;
    if (g_rate[1].nout != 3 * NSYM / 2) failures++;
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
