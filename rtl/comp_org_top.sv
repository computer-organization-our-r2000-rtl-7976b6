// comp_org_top: the complete set of designs, side by side.
//
// The main design is the multi-cycle R2000-subset processor with its shared
// memory (r2000). Next to it, each with its own ports, stand the smaller
// building blocks of a computer's datapath that the processor is explained
// from: three ways of connecting four registers for register transfers (a
// shared bus of registers with load and output enables, a common
// multiplexer-driven input bus, and point-to-point multiplexers), a 4 x 4
// register file, a 1024 x 4 static RAM, and a 32-bit adder built from full-adder
// bit slices. These blocks do not connect to the processor or to each other;
// they share only the clock and reset. Port prefixes name the design: cpu_,
// bus_, mux_, p2p_, rf_, sram_, add_.
module comp_org_top
  import r2000_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 256,
  parameter int unsigned RT_WIDTH  = 8,
  parameter int unsigned ADD_WIDTH = 32
) (
  input  logic                clk,
  input  logic                rst,
  // R2000 processor
  output logic                cpu_halted,
  output word_t               cpu_pc,
  output word_t               cpu_ir,
  output state_e              cpu_state,
  // Register transfer over a shared bus
  input  logic [3:0]          bus_ld,
  input  logic [3:0]          bus_oe,
  input  logic                bus_ext_oe,
  input  logic [RT_WIDTH-1:0] bus_ext_d,
  output logic [RT_WIDTH-1:0] bus_value,
  // Register transfer over a multiplexer-driven input bus
  input  logic [3:0]          mux_ld,
  input  logic [2:0]          mux_src,
  input  logic [RT_WIDTH-1:0] mux_ext_d,
  output logic [RT_WIDTH-1:0] mux_bus,
  output logic [RT_WIDTH-1:0] mux_r [4],
  // Point-to-point register transfer
  input  logic [3:0]          p2p_ld,
  input  logic [2:0]          p2p_sel [4],
  input  logic [RT_WIDTH-1:0] p2p_ext_d,
  output logic [RT_WIDTH-1:0] p2p_r [4],
  // 4 x 4 register file
  input  logic                rf_ren,
  input  logic [1:0]          rf_raddr,
  input  logic                rf_wen,
  input  logic [1:0]          rf_waddr,
  input  logic [3:0]          rf_d,
  output logic [3:0]          rf_q,
  output logic                rf_q_en,
  // 1024 x 4 static RAM
  input  logic [9:0]          sram_a,
  input  logic                sram_rd,
  input  logic                sram_wr,
  input  logic [3:0]          sram_io_in,
  output logic [3:0]          sram_io_out,
  output logic                sram_io_oe,
  // Bit-slice adder
  input  logic [ADD_WIDTH-1:0] add_a,
  input  logic [ADD_WIDTH-1:0] add_b,
  input  logic                 add_cin,
  output logic [ADD_WIDTH-1:0] add_sum,
  output logic                 add_cout
);

  r2000 #(.MEM_DEPTH(MEM_DEPTH)) u_cpu (
    .clk, .rst, .halted(cpu_halted), .pc_o(cpu_pc), .ir_o(cpu_ir), .state_o(cpu_state)
  );

  rt_common_bus #(.WIDTH(RT_WIDTH)) u_bus (
    .clk, .rst, .ld(bus_ld), .oe(bus_oe), .ext_oe(bus_ext_oe), .ext_d(bus_ext_d),
    .bus(bus_value)
  );

  rt_mux_bus #(.WIDTH(RT_WIDTH)) u_mux (
    .clk, .rst, .ld(mux_ld), .src(mux_src), .ext_d(mux_ext_d), .bus(mux_bus), .r_q(mux_r)
  );

  rt_point_to_point #(.WIDTH(RT_WIDTH)) u_p2p (
    .clk, .rst, .ld(p2p_ld), .sel(p2p_sel), .ext_d(p2p_ext_d), .r_q(p2p_r)
  );

  regfile4x4 u_rf (
    .clk, .ren(rf_ren), .raddr(rf_raddr), .wen(rf_wen), .waddr(rf_waddr),
    .d(rf_d), .q(rf_q), .q_en(rf_q_en)
  );

  sram1024x4 u_sram (
    .clk, .a(sram_a), .rd(sram_rd), .wr(sram_wr),
    .io_in(sram_io_in), .io_out(sram_io_out), .io_oe(sram_io_oe)
  );

  ripple_adder #(.WIDTH(ADD_WIDTH)) u_add (
    .a(add_a), .b(add_b), .cin(add_cin), .sum(add_sum), .cout(add_cout)
  );

endmodule
