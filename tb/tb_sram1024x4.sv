// tb_sram1024x4: writes every one of the 1024 words, then mixes random reads
// and writes, comparing each read with a model; checks that the outputs are
// off while rd is low.
`timescale 1ns/1ps
module tb_sram1024x4;
  logic clk = 0, rd, wr, io_oe;
  logic [9:0] a;
  logic [3:0] io_in, io_out;
  logic [3:0] model [1024];
  int checks = 0, failures = 0;

  sram1024x4 dut (.clk, .a, .rd, .wr, .io_in, .io_out, .io_oe);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd = 0; wr = 0; a = 0; io_in = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      a = 10'(i); wr = 1; io_in = 4'($urandom); model[i] = io_in;
    end
    @(negedge clk);
    wr = 0;
    for (int i = 0; i < 5000; i++) begin
      a = $urandom;
      rd = $urandom_range(0, 2) != 0;
      wr = !rd;
      io_in = $urandom;
      #1;
      checks++;
      if (io_oe !== rd || io_out !== (rd ? model[a] : 4'h0)) begin
        failures++;
        if (failures < 10) $display("read %0d: %h expected %h", a, io_out, model[a]);
      end
      if (wr) model[a] = io_in;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
