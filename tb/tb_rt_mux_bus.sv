// tb_rt_mux_bus: register transfers through the multiplexer-driven input bus:
// random source selects (a register or the external input) and random sets of
// destination registers, checking the bus and all four registers in every
// cycle against a model.
`timescale 1ns/1ps
module tb_rt_mux_bus;
  logic clk = 0, rst;
  logic [3:0] ld;
  logic [2:0] src;
  logic [7:0] ext_d, bus;
  logic [7:0] r_q [4];
  logic [7:0] model [4];
  logic [7:0] exp_bus;
  int checks = 0, failures = 0;

  rt_mux_bus dut (.clk, .rst, .ld, .src, .ext_d, .bus, .r_q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ld = 0; src = 4; ext_d = 0;
    @(negedge clk);
    rst = 0;
    for (int r = 0; r < 4; r++) model[r] = 0;
    for (int i = 0; i < 2000; i++) begin
      src = (i < 8) ? 3'd4 : 3'($urandom_range(0, 5));
      ext_d = $urandom;
      ld = $urandom;
      exp_bus = (src < 4) ? model[src[1:0]] : ext_d;
      #1;
      checks++;
      if (bus !== exp_bus) begin
        failures++;
        if (failures < 10) $display("step %0d: bus %h expected %h", i, bus, exp_bus);
      end
      @(negedge clk);
      for (int r = 0; r < 4; r++) if (ld[r]) model[r] = exp_bus;
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (r_q[r] !== model[r]) begin
          failures++;
          if (failures < 10) $display("step %0d: R%0d %h expected %h", i, r, r_q[r], model[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
