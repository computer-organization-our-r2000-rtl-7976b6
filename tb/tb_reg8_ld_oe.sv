// tb_reg8_ld_oe: checks the 8-bit register with load and output enables:
// load only on edges with ld high, hold otherwise, output driven (q_en high,
// q = contents) only while oe is high, against a model over random stimulus.
`timescale 1ns/1ps
module tb_reg8_ld_oe;
  logic clk = 0, rst, ld, oe, q_en;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0;

  reg8_ld_oe dut (.clk, .rst, .ld, .oe, .d, .q, .q_en);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ld = 0; oe = 0; d = 0;
    @(negedge clk);
    rst = 0; model = 0;
    for (int i = 0; i < 1000; i++) begin
      ld = $urandom_range(0, 1);
      d = $urandom;
      oe = $urandom_range(0, 1);
      @(negedge clk);
      if (ld) model = d;
      #1;
      checks++;
      if (q_en !== oe || q !== (oe ? model : 8'h00)) begin
        failures++;
        if (failures < 10) $display("step %0d: q=%h q_en=%0d expected %h", i, q, q_en, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
