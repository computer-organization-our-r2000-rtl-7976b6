// sram1024x4: a static RAM of 1024 words of 4 bits, with 10 address lines, a
// read enable (chip select), a write enable and a data port that outputs when
// reading and takes input when writing.
//
// Read: while rd is high, io_out is the addressed word and io_oe is high, so
// several chips can share the data lines; while rd is low the outputs are off
// (io_oe low, io_out zero). Write: a word is stored from io_in at a rising edge
// of clk while wr is high. Size, address width and pin functions follow the
// published part. The part itself is asynchronous with one bidirectional data
// port; the split data port, the output-enable flag and the clocked write are
// this implementation's stand-ins for two-valued synchronous logic. Reading and
// writing in the same cycle is not meant to happen (one shared data port); an
// assertion flags it.
module sram1024x4 #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned WIDTH = 4
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] a,
  input  logic                     rd,
  input  logic                     wr,
  input  logic [WIDTH-1:0]         io_in,
  output logic [WIDTH-1:0]         io_out,
  output logic                     io_oe
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr) mem[a] <= io_in;
  end

  assign io_out = rd ? mem[a] : '0;
  assign io_oe  = rd;

  a_rd_wr_exclusive: assert property (@(posedge clk) !(rd && wr));

endmodule
