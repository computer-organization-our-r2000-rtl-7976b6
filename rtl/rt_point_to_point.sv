// rt_point_to_point: four registers, each with its own input multiplexer wired
// to every register's output (dedicated wires, no shared bus).
//
// Register Ri loads at the rising edge when ld[i] is high, from the source its
// own select sel[i] names: 0..3 register R0..R3, 4 (or above) the external
// input ext_d. Because every register has its own multiplexer, several
// transfers, including a swap of two registers, happen in the same clock. The
// organisation follows the published one; the fifth multiplexer input for
// external data and the synchronous reset are this implementation's additions.
module rt_point_to_point #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [3:0]       ld,
  input  logic [2:0]       sel [4],
  input  logic [WIDTH-1:0] ext_d,
  output logic [WIDTH-1:0] r_q [4]
);

  logic [WIDTH-1:0] mux_out [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      if (sel[i] < 3'd4) mux_out[i] = r_q[sel[i][1:0]];
      else               mux_out[i] = ext_d;
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (rst)        r_q[i] <= '0;
      else if (ld[i]) r_q[i] <= mux_out[i];
    end
  end

endmodule
