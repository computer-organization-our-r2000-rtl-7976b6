// tb_full_adder: checks the full adder (and so its two half adders) on all
// eight input combinations against the arithmetic sum of the three bits.
`timescale 1ns/1ps
module tb_full_adder;
  logic ain, bin, cin, sum, cout;
  int checks = 0, failures = 0;

  full_adder dut (.ain, .bin, .cin, .sum, .cout);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {ain, bin, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} !== 2'(ain + bin + cin)) begin
        failures++;
        $display("%b%b%b: sum %b cout %b", ain, bin, cin, sum, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
