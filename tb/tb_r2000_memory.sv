// tb_r2000_memory: checks the 256-word memory: combinational read while read
// is high (zero otherwise), write at the clock edge, only the low 8 address
// bits used, against a model array.
`timescale 1ns/1ps
module tb_r2000_memory;
  import r2000_pkg::*;

  logic clk = 0, read, write;
  word_t address, wdata, rdata;
  word_t model [256];
  int checks = 0, failures = 0;

  r2000_memory dut (.clk, .address, .read, .write, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    read = 0; write = 0; address = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      address = i; write = 1; wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk);
    write = 0;
    for (int i = 0; i < 4000; i++) begin
      address = $urandom;            // upper bits must be ignored
      read = $urandom_range(0, 3) != 0;
      write = !read && $urandom_range(0, 1);
      wdata = $urandom;
      #1;
      checks++;
      if (rdata !== (read ? model[address[7:0]] : 0)) begin
        failures++;
        if (failures < 10) $display("read %h: %h expected %h", address, rdata, model[address[7:0]]);
      end
      if (write) model[address[7:0]] = wdata;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
