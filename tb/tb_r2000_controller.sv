// tb_r2000_controller: checks the controller state machine on its own.
//
// The instruction register input is set to one instruction of each kind and
// the controller is stepped from reset through the whole instruction. In every
// cycle the state and the control outputs are compared with a hand-written
// expected sequence: the enables (memory read/write, bus drivers, register
// loads, register-file write, PC load) always, and the multiplexer selects and
// ALU operation where they matter. The ALU flags are driven as the datapath
// would produce them, so both outcomes of slt and beq are covered. The number
// of cycles per instruction (3 for add, 5 for lw, ...) is checked through the
// length of each sequence, and halt must hold execute1.
`timescale 1ns/1ps
module tb_r2000_controller;
  import r2000_pkg::*;

  logic clk = 0, rst, zero, neg, halted;
  word_t inst;
  ctrl_t ctrl;
  state_e state;
  int checks = 0, failures = 0;

  r2000_controller dut (.clk, .rst, .inst, .zero, .neg, .ctrl, .state, .halted);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected enables, in this order
  typedef struct packed {
    logic mr, mw, pc_ma_en, alu_ma_en, regb_md_en, mbr_ld, ir_ld, reg_write, pc_ld;
  } en_t;

  typedef struct {
    state_e  st;
    en_t     en;
    bit      chk_alu;   // compare src_a/src_b/alu_op
    srca_e   sa;
    srcb_e   sb;
    alu_op_e op;
    bit      chk_wr;    // compare wr_data_sel/wr_reg_sel
    logic    wds, wrs;
    bit      chk_pc;    // compare pc_sel
    logic    pcs;
  } step_t;

  function automatic en_t en_of(ctrl_t c);
    return '{c.mr, c.mw, c.pc_ma_en, c.alu_ma_en, c.regb_md_en, c.mbr_ld, c.ir_ld,
             c.reg_write, c.pc_ld};
  endfunction

  function automatic step_t st_fetch();
    return '{S_FETCH, '{1,0,1,0,0,0,1,0,1}, 1, SRCA_PC, SRCB_ONE, ALU_ADD, 0, 0, 0, 1, PCSEL_ALU};
  endfunction
  function automatic step_t st_decode();
    return '{S_DECODE, '0, 0, SRCA_REG, SRCB_REG, ALU_NONE, 0, 0, 0, 0, 0};
  endfunction
  function automatic step_t st_alu(alu_op_e op);
    return '{S_EXECUTE1, '{0,0,0,0,0,0,0,1,0}, 1, SRCA_REG, SRCB_REG, op, 1, WDATA_ALU, WREG_RD, 0, 0};
  endfunction

  step_t seq [$];

  task automatic run_seq(string name, word_t ins, logic z, logic n);
    inst = ins; zero = z; neg = n;
    rst = 1;
    @(negedge clk);
    rst = 0;
    foreach (seq[k]) begin
      checks++;
      if (state !== seq[k].st || en_of(ctrl) !== seq[k].en
          || (seq[k].chk_alu && (ctrl.src_a !== seq[k].sa || ctrl.src_b !== seq[k].sb
                                 || ctrl.alu_op !== seq[k].op))
          || (seq[k].chk_wr && (ctrl.wr_data_sel !== seq[k].wds || ctrl.wr_reg_sel !== seq[k].wrs))
          || (seq[k].chk_pc && ctrl.pc_sel !== seq[k].pcs)) begin
        failures++;
        $display("%s cycle %0d: state %s en %b sa %0d sb %0d op %b wds %0d wrs %0d pcs %0d; expected state %s en %b",
                 name, k, state.name(), en_of(ctrl), ctrl.src_a, ctrl.src_b, ctrl.alu_op,
                 ctrl.wr_data_sel, ctrl.wr_reg_sel, ctrl.pc_sel, seq[k].st.name(), seq[k].en);
      end
      @(negedge clk);
    end
    // after the sequence the next instruction is fetched
    checks++;
    if (state !== S_FETCH) begin
      failures++;
      $display("%s: after %0d cycles state is %s, expected fetch", name, seq.size(), state.name());
    end
  endtask

  initial begin
    rst = 1; zero = 0; neg = 0; inst = 0;
    @(negedge clk);

    // R-type, 3 cycles each
    seq = '{st_fetch(), st_decode(), st_alu(ALU_ADD)};
    run_seq("add", enc_r(FN_ADD, 1, 2, 3), 0, 0);
    seq = '{st_fetch(), st_decode(), st_alu(ALU_SUB)};
    run_seq("sub", enc_r(FN_SUB, 1, 2, 3), 0, 1);
    seq = '{st_fetch(), st_decode(), st_alu(ALU_AND)};
    run_seq("and", enc_r(FN_AND, 1, 2, 3), 1, 0);
    seq = '{st_fetch(), st_decode(), st_alu(ALU_OR)};
    run_seq("or", enc_r(FN_OR, 1, 2, 3), 0, 0);

    // slt: 4 cycles, execute2 writes 1 when neg, execute3 writes 0 otherwise
    seq = '{st_fetch(), st_decode(),
            '{S_EXECUTE1, '0, 1, SRCA_REG, SRCB_REG, ALU_SUB, 0, 0, 0, 0, 0},
            '{S_EXECUTE2, '{0,0,0,0,0,0,0,1,0}, 1, SRCA_REG, SRCB_ONE, ALU_PASSB, 1, WDATA_ALU, WREG_RD, 0, 0}};
    seq[3].chk_alu = 0;  // src_a is a don't-care here
    run_seq("slt lt", enc_r(FN_SLT, 1, 2, 3), 0, 1);
    seq = '{st_fetch(), st_decode(),
            '{S_EXECUTE1, '0, 1, SRCA_REG, SRCB_REG, ALU_SUB, 0, 0, 0, 0, 0},
            '{S_EXECUTE3, '{0,0,0,0,0,0,0,1,0}, 0, SRCA_REG, SRCB_ZERO, ALU_PASSB, 1, WDATA_ALU, WREG_RD, 0, 0}};
    run_seq("slt ge", enc_r(FN_SLT, 1, 2, 3), 0, 0);

    // lw: 5 cycles
    seq = '{st_fetch(), st_decode(),
            '{S_EXECUTE1, '0, 1, SRCA_REG, SRCB_IMMED, ALU_ADD, 0, 0, 0, 0, 0},
            '{S_EXECUTE2, '{1,0,0,1,0,1,0,0,0}, 0, SRCA_REG, SRCB_REG, ALU_NONE, 0, 0, 0, 0, 0},
            '{S_EXECUTE3, '{0,0,0,0,0,0,0,1,0}, 0, SRCA_REG, SRCB_REG, ALU_NONE, 1, WDATA_MBR, WREG_RT, 0, 0}};
    run_seq("lw", enc_i(OP_LW, 1, 2, 16'd7), 0, 0);

    // sw: 4 cycles
    seq = '{st_fetch(), st_decode(),
            '{S_EXECUTE1, '0, 1, SRCA_REG, SRCB_IMMED, ALU_ADD, 0, 0, 0, 0, 0},
            '{S_EXECUTE2, '{0,1,0,1,1,0,0,0,0}, 0, SRCA_REG, SRCB_REG, ALU_NONE, 0, 0, 0, 0, 0}};
    run_seq("sw", enc_i(OP_SW, 1, 2, 16'd7), 0, 0);

    // beq: 3 cycles not taken, 4 taken
    seq = '{st_fetch(), st_decode(),
            '{S_EXECUTE1, '0, 1, SRCA_REG, SRCB_REG, ALU_SUB, 0, 0, 0, 0, 0}};
    run_seq("beq not taken", enc_i(OP_BEQ, 1, 2, 16'd7), 0, 0);
    seq = '{st_fetch(), st_decode(),
            '{S_EXECUTE1, '0, 1, SRCA_REG, SRCB_REG, ALU_SUB, 0, 0, 0, 0, 0},
            '{S_EXECUTE2, '{0,0,0,0,0,0,0,0,1}, 1, SRCA_PC, SRCB_IMMED, ALU_ADD, 0, 0, 0, 1, PCSEL_ALU}};
    run_seq("beq taken", enc_i(OP_BEQ, 1, 2, 16'd7), 1, 0);

    // addi: 3 cycles
    seq = '{st_fetch(), st_decode(),
            '{S_EXECUTE1, '{0,0,0,0,0,0,0,1,0}, 1, SRCA_REG, SRCB_IMMED, ALU_ADD, 1, WDATA_ALU, WREG_RT, 0, 0}};
    run_seq("addi", enc_i(OP_ADDI, 1, 2, 16'hffff), 0, 0);

    // j: 3 cycles
    seq = '{st_fetch(), st_decode(),
            '{S_EXECUTE1, '{0,0,0,0,0,0,0,0,1}, 0, SRCA_REG, SRCB_REG, ALU_NONE, 0, 0, 0, 1, PCSEL_TARGET}};
    run_seq("j", enc_j(OP_J, 26'h123), 0, 0);

    // halt: stays in execute1 with nothing enabled
    inst = enc_j(OP_HALT, 0);
    rst = 1;
    @(negedge clk);
    rst = 0;
    repeat (2) @(negedge clk);
    for (int k = 0; k < 10; k++) begin
      checks++;
      if (state !== S_EXECUTE1 || !halted || en_of(ctrl) !== '0) begin
        failures++;
        $display("halt cycle %0d: state %s halted %0d en %b", k, state.name(), halted, en_of(ctrl));
      end
      @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
