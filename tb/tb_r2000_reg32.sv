// tb_r2000_reg32: checks the 32-bit load-enable register (reset, hold, load)
// against a model over random stimulus.
`timescale 1ns/1ps
module tb_r2000_reg32;
  import r2000_pkg::*;

  logic clk = 0, rst, ld;
  word_t d, q, exp_q;
  int checks = 0, failures = 0;

  r2000_reg32 dut (.clk, .rst, .ld, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ld = 0; d = 0;
    @(negedge clk);
    exp_q = 0;
    for (int i = 0; i < 1000; i++) begin
      rst = ($urandom_range(0, 50) == 0);
      ld = $urandom_range(0, 1);
      d = $urandom;
      @(negedge clk);
      if (rst) exp_q = 0;
      else if (ld) exp_q = d;
      checks++;
      if (q !== exp_q) begin
        failures++;
        if (failures < 10) $display("step %0d: q=%h expected %h", i, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
