// tb_r2000_regfile: checks the 32 x 32 register file against a model: RegA
// and RegB capture registers rs and rt at each edge (old value on a same-edge
// write), writes go to rd or rt with ALU or MBR data, and register 31 always
// reads zero whatever is written to it.
`timescale 1ns/1ps
module tb_r2000_regfile;
  import r2000_pkg::*;

  logic clk = 0, rst, reg_write, wr_data_sel, wr_reg_sel;
  word_t mbr, alu_out, inst, reg_a, reg_b;
  word_t model [32];
  word_t exp_a, exp_b;
  logic [4:0] rs, rt, rd, wr;
  int checks = 0, failures = 0;

  r2000_regfile dut (.clk, .rst, .mbr, .alu_out, .inst, .reg_write, .wr_data_sel,
                     .wr_reg_sel, .reg_a, .reg_b);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; reg_write = 0; wr_data_sel = 0; wr_reg_sel = 0;
    mbr = 0; alu_out = 0; inst = 0;
    @(negedge clk);
    rst = 0;
    // fill every register with a known value
    for (int r = 0; r < 32; r++) begin
      inst = {6'd0, 5'd0, 5'(r), 5'd0, 11'd0};
      reg_write = 1; wr_reg_sel = WREG_RT; wr_data_sel = WDATA_ALU;
      alu_out = $urandom;
      model[r] = (r == 31) ? 0 : alu_out;
      @(negedge clk);
    end
    for (int i = 0; i < 3000; i++) begin
      inst = $urandom;
      rs = inst[25:21]; rt = inst[20:16]; rd = inst[15:11];
      reg_write = $urandom_range(0, 1);
      wr_reg_sel = $urandom_range(0, 1);
      wr_data_sel = $urandom_range(0, 1);
      mbr = $urandom;
      alu_out = $urandom;
      exp_a = model[rs];
      exp_b = model[rt];
      wr = wr_reg_sel ? rd : rt;
      if (reg_write && wr != 31) model[wr] = wr_data_sel ? mbr : alu_out;
      @(negedge clk);
      checks++;
      if (reg_a !== exp_a || reg_b !== exp_b) begin
        failures++;
        if (failures < 10)
          $display("step %0d rs=%0d rt=%0d: A=%h B=%h expected %h %h", i, rs, rt,
                   reg_a, reg_b, exp_a, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
