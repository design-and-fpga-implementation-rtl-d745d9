// tb_qam_mapper -- checks the 16-QAM axis mapper: for each (U,C) the level
// must be the document's 12-bit code, lie within one LSB of the ideal
// +-3/sqrt(10), +-1/sqrt(10) in Fix(12,11), keep the sign rule (U = 0
// positive) and keep same-C points two levels apart; vout must follow vin
// by one cycle and the level must hold while vin is low.
`timescale 1ns/1ps
module tb_qam_mapper;
  import dvb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic u, c, vin, vout;
  sample_t level;
  qam_mapper dut (.clk, .rst_n, .u, .c, .vin, .level, .vout);

  int checks = 0, failures = 0;
  logic [11:0] CODE [4] = '{12'h796, 12'h287, 12'hD79, 12'h86A};
  int IDEAL [4] = '{3, 1, -1, -3};

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("fail: %s", what);
    end
  endtask

  initial begin
    int lv [4];
    u = 0; c = 0; vin = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int rep = 0; rep < 3; rep++)
      for (int k = 0; k < 4; k++) begin
        real ideal, err;
        bit close;
        u <= k[1]; c <= k[0]; vin <= 1;
        @(posedge clk);
        vin <= 0; u <= !k[1]; c <= !k[0];
        @(posedge clk);
        chk(vout == 1'b1, "vout");
        chk(level == CODE[k], "code");
        ideal = IDEAL[k] * 647.6344;   // 2048 / sqrt(10)
        err = level;
        err = err - ideal;
        close = (err < 1.0) && (err > -1.0);
        chk(close, "ideal");
        chk((level < 0) == k[1], "sign");
        lv[k] = level;
        @(posedge clk);
        chk(vout == 1'b0 && level == CODE[k], "hold");
      end
    chk(lv[0] - lv[2] == lv[1] - lv[3] && lv[0] - lv[1] < lv[0] - lv[2], "spacing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
