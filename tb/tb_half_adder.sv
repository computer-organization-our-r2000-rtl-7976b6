// tb_half_adder: checks the half adder on all four input combinations against
// the arithmetic sum of the two bits.
`timescale 1ns/1ps
module tb_half_adder;
  logic a, b, s, c;
  int checks = 0, failures = 0;

  half_adder dut (.a, .b, .s, .c);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({c, s} !== 2'(a + b)) begin
        failures++;
        $display("%b%b: s %b c %b", a, b, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
