// rt_mux_bus: four registers fed by one common input bus that a multiplexer
// drives.
//
// The multiplexer chooses the bus source with src: 0..3 select register R0..R3,
// 4 selects the external input ext_d (any other value selects ext_d too). Every
// register has a load enable; those with ld high take the bus at the rising
// edge, so one transfer (one source, any number of destinations) happens per
// clock. The organisation (load enables per register, select lines for the
// multiplexer) follows the published one; the external input and the
// synchronous reset are this implementation's additions.
module rt_mux_bus #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [3:0]       ld,
  input  logic [2:0]       src,
  input  logic [WIDTH-1:0] ext_d,
  output logic [WIDTH-1:0] bus,
  output logic [WIDTH-1:0] r_q [4]
);

  always_comb begin
    if (src < 3'd4) bus = r_q[src[1:0]];
    else            bus = ext_d;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (rst)        r_q[i] <= '0;
      else if (ld[i]) r_q[i] <= bus;
    end
  end

endmodule
