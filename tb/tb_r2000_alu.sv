// tb_r2000_alu: checks the ALU and its input multiplexers against a model.
// Every combination of operation (including a non-one-hot code), A source and
// B source is applied with random operands and corner values; the result, zero
// and neg are compared with values computed here.
`timescale 1ns/1ps
module tb_r2000_alu;
  import r2000_pkg::*;

  word_t reg_a, pc, inst, reg_b, alu_out;
  alu_op_e op;
  srca_e src_a;
  srcb_e src_b;
  logic zero, neg;
  int checks = 0, failures = 0;

  r2000_alu dut (.reg_a, .pc, .inst, .reg_b, .op, .src_a, .src_b, .alu_out, .zero, .neg);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t model(word_t ra, word_t p, word_t in, word_t rb,
                                  logic [5:0] o, logic sa, logic [1:0] sb);
    word_t a, b;
    a = sa ? p : ra;
    case (sb)
      2'b00: b = rb;
      2'b01: b = 0;
      2'b10: b = {{16{in[15]}}, in[15:0]};
      default: b = 1;
    endcase
    case (o)
      6'b000001: return a + b;
      6'b000010: return a - b;
      6'b000100: return a & b;
      6'b001000: return a | b;
      6'b010000: return a;
      6'b100000: return b;
      default:   return 0;
    endcase
  endfunction

  localparam logic [5:0] OPS [7] = '{6'b000001, 6'b000010, 6'b000100, 6'b001000,
                                     6'b010000, 6'b100000, 6'b000011};
  word_t exp_v;

  initial begin
    for (int it = 0; it < 300; it++) begin
      case (it % 5)
        0: begin reg_a = $urandom; reg_b = $urandom; end
        1: begin reg_a = 0; reg_b = 0; end
        2: begin reg_a = 32'h7fffffff; reg_b = 32'hffffffff; end
        3: begin reg_a = $urandom; reg_b = reg_a; end
        default: begin reg_a = 32'h80000000; reg_b = 1; end
      endcase
      pc = $urandom;
      inst = $urandom;
      if (it % 3 == 0) inst[15] = 1'b1;
      for (int o = 0; o < 7; o++)
        for (int sa = 0; sa < 2; sa++)
          for (int sb = 0; sb < 4; sb++) begin
            op = alu_op_e'(OPS[o]);
            src_a = srca_e'(sa);
            src_b = srcb_e'(sb);
            #1;
            exp_v = model(reg_a, pc, inst, reg_b, OPS[o], 1'(sa), 2'(sb));
            checks++;
            if (alu_out !== exp_v || zero !== (exp_v == 0) || neg !== exp_v[31]) begin
              failures++;
              if (failures < 10)
                $display("op=%b sa=%0d sb=%0d: got %h z%0d n%0d, expected %h",
                         OPS[o], sa, sb, alu_out, zero, neg, exp_v);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
