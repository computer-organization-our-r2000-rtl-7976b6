// tb_rt_point_to_point: register transfers over dedicated multiplexers. Each
// register picks its own source every cycle, so several transfers happen at
// once; a swap of R0 and R1 in one cycle is checked explicitly, then random
// parallel transfers are compared with a model.
`timescale 1ns/1ps
module tb_rt_point_to_point;
  logic clk = 0, rst;
  logic [3:0] ld;
  logic [2:0] sel [4];
  logic [7:0] ext_d;
  logic [7:0] r_q [4];
  logic [7:0] model [4];
  logic [7:0] nxt [4];
  int checks = 0, failures = 0;

  rt_point_to_point dut (.clk, .rst, .ld, .sel, .ext_d, .r_q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_and_check(string what);
    for (int r = 0; r < 4; r++)
      nxt[r] = ld[r] ? ((sel[r] < 4) ? model[sel[r][1:0]] : ext_d) : model[r];
    @(negedge clk);
    model = nxt;
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (r_q[r] !== model[r]) begin
        failures++;
        if (failures < 10) $display("%s: R%0d %h expected %h", what, r, r_q[r], model[r]);
      end
    end
  endtask

  initial begin
    rst = 1; ld = 0; ext_d = 0;
    for (int r = 0; r < 4; r++) sel[r] = 4;
    @(negedge clk);
    rst = 0;
    for (int r = 0; r < 4; r++) model[r] = 0;
    for (int r = 0; r < 4; r++) begin
      ld = 4'(1 << r); sel[r] = 4; ext_d = $urandom;
      step_and_check("load");
    end
    // swap R0 and R1 in one clock
    ld = 4'b0011; sel[0] = 1; sel[1] = 0;
    step_and_check("swap");
    for (int i = 0; i < 2000; i++) begin
      ld = $urandom;
      for (int r = 0; r < 4; r++) sel[r] = 3'($urandom_range(0, 4));
      ext_d = $urandom;
      step_and_check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
