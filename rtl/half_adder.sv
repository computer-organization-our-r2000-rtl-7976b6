// half_adder: adds two bits, the lowest level of the adder hierarchy.
// s = a xor b is the sum bit, c = a and b the carry (the standard half-adder
// equations). Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
