// rt_common_bus: four registers joined by one shared input/output bus, each
// register with its own load enable and output enable.
//
// A transfer Ri -> Rj takes one clock: oe[i] puts Ri on the bus and ld[j]
// loads the bus into Rj at the rising edge. ext_oe drives the bus from ext_d
// instead, to bring data in. The bus is an output, so a register is read by
// enabling its output with no destination loading. Only one source may
// drive the bus in a cycle (an assertion checks this); with none enabled the
// bus reads zero. The registers are reg8_ld_oe parts, and the three-state bus
// of the published drawing is an OR of the enabled (and otherwise zero)
// outputs. The organisation follows the published one; the external source and
// the reset are this implementation's additions.
module rt_common_bus #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [3:0]       ld,
  input  logic [3:0]       oe,
  input  logic             ext_oe,
  input  logic [WIDTH-1:0] ext_d,
  output logic [WIDTH-1:0] bus
);

  logic [WIDTH-1:0] drv [4];
  logic [3:0]       drv_en;

  for (genvar i = 0; i < 4; i++) begin : g_reg
    reg8_ld_oe #(.WIDTH(WIDTH)) u_r (
      .clk, .rst, .ld(ld[i]), .oe(oe[i]), .d(bus), .q(drv[i]), .q_en(drv_en[i])
    );
  end

  always_comb begin
    bus = ext_oe ? ext_d : '0;
    for (int i = 0; i < 4; i++) bus |= drv[i];
  end

  a_one_bus_driver: assert property (@(posedge clk) disable iff (rst)
    $onehot0({drv_en, ext_oe}));

endmodule
