// r2000_alu: the processor's single 32-bit ALU, with its two input multiplexers.
//
// The A input is RegA or the PC (src_a). The B input is RegB, zero, the
// sign-extended 16-bit immediate Inst[15:0], or one (src_b). The one-hot op
// selects add, subtract, and, or, pass A or pass B. zero flags an all-zero
// result and neg copies its bit 31; the controller branches on these for
// slt (neg of rs - rt) and beq (zero of rs - rt).
// Purely combinational: the result is valid in the same cycle as the inputs.
// Input selects, operation codes and flags follow the published design. An
// operation code that is not one-hot gives a zero result here; the original
// leaves it undefined.
module r2000_alu
  import r2000_pkg::*;
(
  input  word_t   reg_a,
  input  word_t   pc,
  input  word_t   inst,
  input  word_t   reg_b,
  input  alu_op_e op,
  input  srca_e   src_a,
  input  srcb_e   src_b,
  output word_t   alu_out,
  output logic    zero,
  output logic    neg
);

  word_t a, b;

  always_comb begin
    a = (src_a == SRCA_PC) ? pc : reg_a;
    unique case (src_b)
      SRCB_REG:   b = reg_b;
      SRCB_ZERO:  b = '0;
      SRCB_IMMED: b = sign_ext16(inst[15:0]);
      SRCB_ONE:   b = 32'd1;
    endcase
  end

  always_comb begin
    case (op)
      ALU_ADD:   alu_out = a + b;
      ALU_SUB:   alu_out = a - b;
      ALU_AND:   alu_out = a & b;
      ALU_OR:    alu_out = a | b;
      ALU_PASSA: alu_out = a;
      ALU_PASSB: alu_out = b;
      default:   alu_out = '0;
    endcase
    zero = (alu_out == '0);
    neg  = alu_out[XLEN-1];
  end

endmodule
