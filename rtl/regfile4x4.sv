// regfile4x4: a register file of four 4-bit words (16 flip-flops) with
// separate read and write addresses, so one word can be read while another is
// written.
//
// Write: on a rising clock edge with wen high, d is stored in word waddr.
// Read: while ren is high, q is word raddr (combinational; a word written at an
// edge is visible right after it); while ren is low q is not driven (q_en low,
// q reads zero). Word count, word width and the enable/address pins follow the
// published part; the clock pin, which the part's symbol leaves out, and the
// two-valued stand-in for the undriven output are this implementation's. No
// reset: the words hold whatever was last written.
module regfile4x4 #(
  parameter int unsigned WORDS = 4,
  parameter int unsigned WIDTH = 4
) (
  input  logic                     clk,
  input  logic                     ren,
  input  logic [$clog2(WORDS)-1:0] raddr,
  input  logic                     wen,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [WIDTH-1:0]         d,
  output logic [WIDTH-1:0]         q,
  output logic                     q_en
);

  logic [WIDTH-1:0] words [WORDS];

  always_ff @(posedge clk) begin
    if (wen) words[waddr] <= d;
  end

  assign q    = ren ? words[raddr] : '0;
  assign q_en = ren;

endmodule
