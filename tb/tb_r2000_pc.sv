// tb_r2000_pc: checks the program counter: reset to zero, hold when not
// loaded, load of the ALU result, load of the 26-bit jump target (upper six
// bits cleared), against a model register, over random stimulus.
`timescale 1ns/1ps
module tb_r2000_pc;
  import r2000_pkg::*;

  logic clk = 0, rst, pc_sel, pc_ld;
  word_t alu_out, inst, pc, exp_pc;
  int checks = 0, failures = 0;

  r2000_pc dut (.clk, .rst, .alu_out, .inst, .pc_sel, .pc_ld, .pc);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; pc_ld = 0; pc_sel = 0; alu_out = 0; inst = 0;
    @(negedge clk);
    @(negedge clk);
    exp_pc = 0;
    checks++;
    if (pc !== 0) begin failures++; $display("no reset"); end
    for (int i = 0; i < 1000; i++) begin
      rst = ($urandom_range(0, 40) == 0);
      pc_ld = $urandom_range(0, 1);
      pc_sel = $urandom_range(0, 1);
      alu_out = $urandom;
      inst = $urandom;
      @(negedge clk);
      if (rst) exp_pc = 0;
      else if (pc_ld) exp_pc = pc_sel ? alu_out : {6'd0, inst[25:0]};
      checks++;
      if (pc !== exp_pc) begin
        failures++;
        if (failures < 10) $display("step %0d: pc=%h expected %h", i, pc, exp_pc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
