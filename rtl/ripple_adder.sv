// ripple_adder: a WIDTH-bit adder made by replicating one full-adder bit slice
// WIDTH times, each slice's carry-out feeding the next slice's carry-in. The
// published text names 4-, 8-, 16- and 32-bit datapaths built this way; the
// default is 32. Combinational; the carry ripples through all WIDTH slices, so
// the delay grows linearly with the width (the text mentions carry-lookahead or
// carry-select as faster options, which are not built here).
module ripple_adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] carry;
  assign carry[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_slice
    full_adder u_fa (.ain(a[i]), .bin(b[i]), .cin(carry[i]), .sum(sum[i]), .cout(carry[i+1]));
  end
  assign cout = carry[WIDTH];
endmodule
