// tb_rt_common_bus: register transfers over the shared bus. Loads the four
// registers from the external source, then runs random one-source transfers
// (one register or the external input drives, a random set of registers load),
// checking the bus value in every cycle and each register's contents (read by
// enabling its output) against a model.
`timescale 1ns/1ps
module tb_rt_common_bus;
  logic clk = 0, rst, ext_oe;
  logic [3:0] ld, oe;
  logic [7:0] ext_d, bus;
  logic [7:0] model [4];
  logic [7:0] exp_bus;
  int src;
  int checks = 0, failures = 0;

  rt_common_bus dut (.clk, .rst, .ld, .oe, .ext_oe, .ext_d, .bus);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_bus(string what);
    #1;
    checks++;
    if (bus !== exp_bus) begin
      failures++;
      if (failures < 10) $display("%s: bus %h expected %h", what, bus, exp_bus);
    end
  endtask

  initial begin
    rst = 1; ld = 0; oe = 0; ext_oe = 0; ext_d = 0;
    @(negedge clk);
    rst = 0;
    for (int r = 0; r < 4; r++) begin
      ext_oe = 1; ext_d = $urandom; ld = 4'(1 << r); model[r] = ext_d;
      exp_bus = ext_d; check_bus("load");
      @(negedge clk);
    end
    for (int i = 0; i < 2000; i++) begin
      src = $urandom_range(0, 5);  // 0..3 a register, 4 external, 5 none
      oe = (src < 4) ? 4'(1 << src) : 4'b0;
      ext_oe = (src == 4);
      ext_d = $urandom;
      ld = (src == 5) ? 4'b0 : 4'($urandom);
      exp_bus = (src < 4) ? model[src] : (src == 4) ? ext_d : 8'h00;
      check_bus("transfer");
      @(negedge clk);
      for (int r = 0; r < 4; r++) if (ld[r]) model[r] = exp_bus;
    end
    ld = 0; ext_oe = 0;
    for (int r = 0; r < 4; r++) begin
      oe = 4'(1 << r); exp_bus = model[r]; check_bus("final read");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
