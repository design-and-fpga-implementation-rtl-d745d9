// tb_clk_driver -- checks the clock-enable generator at its defaults
// (strobes at 1/3, 1/8 and 1/24 of the clock): every strobe is one cycle
// wide, strobes of output n are exactly DIV[n] cycles apart, the first
// comes DIV[n] cycles after clr is released, and clr restarts them.
`timescale 1ns/1ps
module tb_clk_driver;
  logic clk = 0, clr = 1;
  always #5 clk = !clk;

  logic [2:0] ce;
  clk_driver dut (.clk, .clr, .ce);

  localparam int D [3] = '{3, 8, 24};
  int checks = 0, failures = 0;
  int last [3];
  int cyc;

  always_ff @(posedge clk) begin
    if (clr) begin
      cyc <= 0;
      for (int n = 0; n < 3; n++) last[n] <= 0;
    end else begin
      cyc <= cyc + 1;
      for (int n = 0; n < 3; n++) begin
        if (ce[n]) begin
          checks++;
          if (cyc - last[n] != D[n]) begin
            failures++;
            $display("ce[%0d] at %0d, previous %0d", n, cyc, last[n]);
          end
          last[n] <= cyc;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    clr <= 0;
    repeat (200) @(posedge clk);
    clr <= 1;
    repeat (2) @(posedge clk);
    clr <= 0;
    repeat (100) @(posedge clk);
    checks++;
    if (checks < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
