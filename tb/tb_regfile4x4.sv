// tb_regfile4x4: checks the 4 x 4 register file: writes at the clock edge to
// the write address, reads of the read address while ren is high (output off
// otherwise), read and write of different words in the same cycle, against a
// model over random stimulus.
`timescale 1ns/1ps
module tb_regfile4x4;
  logic clk = 0, ren, wen, q_en;
  logic [1:0] raddr, waddr;
  logic [3:0] d, q;
  logic [3:0] model [4];
  int checks = 0, failures = 0, same_cycle = 0;

  regfile4x4 dut (.clk, .ren, .raddr, .wen, .waddr, .d, .q, .q_en);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ren = 0; wen = 0; raddr = 0; waddr = 0; d = 0;
    for (int w = 0; w < 4; w++) begin
      @(negedge clk);
      wen = 1; waddr = 2'(w); d = 4'($urandom); model[w] = d;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (wen) model[waddr] = d;
      ren = $urandom_range(0, 3) != 0;
      raddr = $urandom;
      wen = $urandom_range(0, 1);
      waddr = $urandom;
      d = $urandom;
      #1;
      checks++;
      if (q_en !== ren || q !== (ren ? model[raddr] : 4'h0)) begin
        failures++;
        if (failures < 10) $display("step %0d: read %0d -> %h expected %h", i, raddr, q, model[raddr]);
      end
      if (ren && wen && raddr != waddr) same_cycle++;
    end
    checks++;
    if (same_cycle == 0) begin failures++; $display("no simultaneous read and write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
