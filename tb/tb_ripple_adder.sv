// tb_ripple_adder: checks the 32-bit bit-slice adder at its default width
// with corner cases (carry through every slice, all ones) and random operands,
// and a 4-bit instance exhaustively, against the arithmetic sum.
`timescale 1ns/1ps
module tb_ripple_adder;
  logic [31:0] a, b, sum;
  logic cin, cout;
  logic [3:0] a4, b4, s4;
  logic c4i, c4o;
  logic [32:0] exp_v;
  int checks = 0, failures = 0;

  ripple_adder dut (.a, .b, .cin, .sum, .cout);
  ripple_adder #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .cin(c4i), .sum(s4), .cout(c4o));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32();
    #1;
    exp_v = {1'b0, a} + {1'b0, b} + 33'(cin);
    checks++;
    if ({cout, sum} !== exp_v) begin
      failures++;
      if (failures < 10) $display("%h + %h + %0d = %h, expected %h", a, b, cin, {cout, sum}, exp_v);
    end
  endtask

  initial begin
    a = 32'hffffffff; b = 0; cin = 1; check32();
    a = 32'hffffffff; b = 32'hffffffff; cin = 1; check32();
    a = 32'h7fffffff; b = 1; cin = 0; check32();
    a = 0; b = 0; cin = 0; check32();
    for (int i = 0; i < 3000; i++) begin
      a = $urandom; b = $urandom; cin = $urandom_range(0, 1); check32();
    end
    for (int v = 0; v < 512; v++) begin
      {c4i, a4, b4} = 9'(v);
      #1;
      checks++;
      if ({c4o, s4} !== 5'(a4 + b4 + c4i)) begin
        failures++;
        if (failures < 10) $display("4-bit %h + %h + %0d = %h", a4, b4, c4i, {c4o, s4});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
