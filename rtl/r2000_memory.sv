// r2000_memory: the processor's shared instruction and data memory.
//
// DEPTH words of 32 bits (256 by default), addressed by word with the low
// address bits. Reading is combinational: while read is high, rdata is the
// addressed word, so the instruction register or the MBR can capture it at the
// end of the same cycle. Writing is synchronous: at the rising clock edge that
// ends a cycle with write high, wdata is stored at the address. The published
// model has one bidirectional data port and writes a fixed delay after the
// write strobe rises; here the port is split into rdata and wdata and the write
// is taken at the clock edge, which stores the same word at the end of the same
// cycle. rdata is zero while read is low (the bus is then driven by another
// source). No reset: memory contents are loaded by the environment.
module r2000_memory
  import r2000_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic  clk,
  input  word_t address,
  input  logic  read,
  input  logic  write,
  input  word_t wdata,
  output word_t rdata
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t mem [0:DEPTH-1];
  logic [AW-1:0] idx;

  assign idx = address[AW-1:0];
  assign rdata = read ? mem[idx] : '0;

  always_ff @(posedge clk) begin
    if (write) mem[idx] <= wdata;
  end

endmodule
