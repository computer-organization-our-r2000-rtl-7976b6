// full_adder: adds two bits and a carry-in, built from two half adders as in
// the published hierarchy: one adds Bin and Cin, the other adds Ain to that
// sum. Cout combines the two half-adder carries with an OR (they are never both
// 1), the standard construction. Combinational.
module full_adder (
  input  logic ain,
  input  logic bin,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic s1, c1, c2;
  half_adder u_ha_bc (.a(bin), .b(cin), .s(s1), .c(c1));
  half_adder u_ha_a  (.a(ain), .b(s1),  .s(sum), .c(c2));
  assign cout = c1 | c2;
endmodule
