// reg8_ld_oe: an 8-bit register with load enable and output enable, the
// building block of bus-connected register transfers.
//
// On a rising clock edge with ld high the eight flip-flops take d; otherwise
// they hold. While oe is high the stored value is driven on q and q_en is high;
// while oe is low q is not driven (q_en low, q reads zero). The behaviour of
// LD and OE and the 8-bit width follow the published part. A real part leaves
// its pins floating when OE is low; here, in two-valued logic, the undriven
// state is signalled by q_en, so that a bus built from several of these
// registers is a multiplexer over the enabled one. The synchronous reset is this
// implementation's addition.
module reg8_ld_oe #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ld,
  input  logic             oe,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             q_en
);

  logic [WIDTH-1:0] state;

  always_ff @(posedge clk) begin
    if (rst)     state <= '0;
    else if (ld) state <= d;
  end

  assign q    = oe ? state : '0;
  assign q_en = oe;

endmodule
