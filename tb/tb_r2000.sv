// tb_r2000: end-to-end test of the R2000-subset processor.
//
// Each test loads a program into the processor's memory, resets the machine,
// runs it until halted, and compares the register file, the whole memory and
// the number of clock cycles with an instruction-level reference model kept in
// this testbench. The model charges each instruction its cycle count (fetch +
// decode + execute states: 3 for add/sub/and/or/addi/j and a not-taken beq, 4
// for slt, sw and a taken beq, 5 for lw).
// Programs:
//   1. the Fibonacci program (n read from word 254, result stored in word 255)
//      for n = 0..12, also checking the result against a directly computed
//      Fibonacci number;
//   2. a bubble sort of 8 signed words, closed by a backward beq (inner loop)
//      and a backward j (outer loop), on a reversed and 5 random arrays, also
//      checking the sorted words against a directly sorted copy;
//   3. 40 random programs of add/sub/and/or/slt/addi/lw/sw with forward beq
//      and j, so that every program ends at its halt.
// It also counts how often each control sequence ran (slt taken either way,
// beq taken and not taken, lw, sw, j, halt) and fails if one never did.
`timescale 1ns/1ps
module tb_r2000;
  import r2000_pkg::*;

  localparam int unsigned DEPTH = 256;

  logic   clk = 1'b0;
  logic   rst;
  logic   halted;
  word_t  pc, ir;
  state_e state;

  int checks = 0;
  int failures = 0;

  r2000 #(.MEM_DEPTH(DEPTH)) dut (
    .clk, .rst, .halted, .pc_o(pc), .ir_o(ir), .state_o(state)
  );

  always #5 clk = ~clk;

  // Watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  word_t prog [DEPTH];
  word_t ref_mem [DEPTH];
  word_t ref_regs [32];
  int    ref_cycles;

  // mechanism counters (from the reference model's view of execution)
  int n_slt_lt = 0, n_slt_ge = 0, n_beq_taken = 0, n_beq_not = 0;
  int n_lw = 0, n_sw = 0, n_j = 0, n_addi = 0, n_rtype = 0, n_halt = 0;

  function automatic word_t rreg(logic [4:0] r);
    return (r == 5'd31) ? '0 : ref_regs[r];
  endfunction

  task automatic ref_run(output bit ok);
    word_t rpc, inst, a, b, res, imm;
    logic [5:0] opc, fnc;
    logic [4:0] rs, rt, rd;
    int steps;
    rpc = 0;
    ref_cycles = 0;
    ok = 1'b1;
    steps = 0;
    forever begin
      inst = ref_mem[rpc[7:0]];
      rpc = rpc + 1;
      opc = inst[31:26]; fnc = inst[5:0];
      rs = inst[25:21]; rt = inst[20:16]; rd = inst[15:11];
      a = rreg(rs); b = rreg(rt); imm = sign_ext16(inst[15:0]);
      steps++;
      if (steps > 20000) begin ok = 1'b0; return; end
      case (opc)
        6'h00: begin
          case (fnc)
            6'h20: begin res = a + b; ref_cycles += 3; n_rtype++; end
            6'h22: begin res = a - b; ref_cycles += 3; n_rtype++; end
            6'h24: begin res = a & b; ref_cycles += 3; n_rtype++; end
            6'h25: begin res = a | b; ref_cycles += 3; n_rtype++; end
            6'h2a: begin
              res = a - b;
              res = {31'd0, res[31]};
              ref_cycles += 4;
              if (res[0]) n_slt_lt++; else n_slt_ge++;
            end
            default: begin ref_cycles += 2; n_halt++; return; end
          endcase
          if (rd != 5'd31) ref_regs[rd] = res;
        end
        6'h08: begin
          if (rt != 5'd31) ref_regs[rt] = a + imm;
          ref_cycles += 3; n_addi++;
        end
        6'h23: begin
          res = ref_mem[(a + imm) & 32'hff];
          if (rt != 5'd31) ref_regs[rt] = res;
          ref_cycles += 5; n_lw++;
        end
        6'h2b: begin
          ref_mem[(a + imm) & 32'hff] = b;
          ref_cycles += 4; n_sw++;
        end
        6'h04: begin
          if (a == b) begin rpc = rpc + imm; ref_cycles += 4; n_beq_taken++; end
          else begin ref_cycles += 3; n_beq_not++; end
        end
        6'h02: begin
          rpc = {6'd0, inst[25:0]};
          ref_cycles += 3; n_j++;
        end
        default: begin ref_cycles += 2; n_halt++; return; end
      endcase
    end
  endtask

  // ---------------- running the design ----------------
  task automatic run_program(string name);
    int cycles;
    bit ok;
    int errs;
    // load memory
    for (int i = 0; i < DEPTH; i++) begin
      dut.u_mem.mem[i] = prog[i];
      ref_mem[i] = prog[i];
    end
    @(negedge clk);
    rst = 1'b1;
    repeat (2) @(negedge clk);
    // register contents are whatever the machine holds; the model starts from them
    for (int r = 0; r < 31; r++) ref_regs[r] = dut.u_rf.regs[r];
    ref_regs[31] = '0;
    rst = 1'b0;
    cycles = 0;
    while (!halted && cycles < 50000) begin
      @(negedge clk);
      cycles++;
    end
    ref_run(ok);
    errs = 0;
    checks++;
    if (!ok || !halted) begin
      failures++; errs++;
      $display("%s: did not halt (model ok=%0d)", name, ok);
    end
    checks++;
    if (cycles != ref_cycles) begin
      failures++; errs++;
      $display("%s: %0d cycles, model expects %0d", name, cycles, ref_cycles);
    end
    for (int r = 0; r < 31; r++) begin
      checks++;
      if (dut.u_rf.regs[r] !== ref_regs[r]) begin
        failures++; errs++;
        $display("%s: r%0d = %h, model %h", name, r, dut.u_rf.regs[r], ref_regs[r]);
      end
    end
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (dut.u_mem.mem[i] !== ref_mem[i]) begin
        failures++; errs++;
        $display("%s: mem[%0d] = %h, model %h", name, i, dut.u_mem.mem[i], ref_mem[i]);
      end
    end
    // stays halted
    repeat (5) @(negedge clk);
    checks++;
    if (!halted || state != S_EXECUTE1) begin
      failures++; errs++;
      $display("%s: did not stay halted", name);
    end
    if (errs == 0) $display("%s: ok, %0d cycles", name, cycles);
  endtask

  // Fibonacci program: r0 = n; r1 = 0; r2 = 1; repeatedly r1 += r2, r2 += r1,
  // counting r0 down, then store the last sum in word 255.
  localparam reg_idx_t R0 = 5'd0, R1 = 5'd1, R2 = 5'd2, R3 = 5'd3, RZ = 5'd31;

  task automatic build_fib(word_t n);
    for (int i = 0; i < DEPTH; i++) prog[i] = '0;
    prog[8'h00] = enc_i(OP_ADDI, RZ, R1, 16'd0);
    prog[8'h01] = enc_i(OP_ADDI, RZ, R2, 16'd1);
    prog[8'h02] = enc_i(OP_LW,   RZ, R0, 16'd254);
    prog[8'h03] = enc_r(FN_SLT,  RZ, R0, R3);        // r3 = (0 < n)
    prog[8'h04] = enc_i(OP_BEQ,  R3, RZ, 16'd9);     // n <= 0: to store
    prog[8'h05] = enc_i(OP_BEQ,  RZ, RZ, 16'd2);     // always: to test
    prog[8'h06] = enc_r(FN_ADD,  R1, R2, R1);        // loop
    prog[8'h07] = enc_i(OP_ADDI, R0, R0, 16'hffff);
    prog[8'h08] = enc_i(OP_BEQ,  R0, RZ, 16'd4);     // test: done after odd step
    prog[8'h09] = enc_r(FN_ADD,  R2, R1, R2);
    prog[8'h0a] = enc_i(OP_ADDI, R0, R0, 16'hffff);
    prog[8'h0b] = enc_i(OP_BEQ,  R0, RZ, 16'd2);
    prog[8'h0c] = enc_j(OP_J, 26'd6);
    prog[8'h0d] = enc_r(FN_OR,   R1, RZ, R2);
    prog[8'h0e] = enc_i(OP_SW,   RZ, R2, 16'd255);
    prog[8'h0f] = enc_j(OP_HALT, 26'd0);
    prog[8'hfe] = n;
  endtask

  // Direct computation of what the program leaves in word 255: the Fibonacci
  // number F(n) (F(0) = 0, F(1) = 1) for n >= 1, and 1 for n = 0 (the
  // program's starting value of r2, stored unchanged).
  function automatic word_t fib(int n);
    word_t x = 0, y = 1, t;
    if (n == 0) return 1;
    for (int k = 2; k <= n; k++) begin t = x + y; x = y; y = t; end
    return y;
  endfunction

  // Bubble sort of the 8 words at 200..207, ascending as signed numbers. Each
  // pass walks i from 200 to 206, swapping a[i] and a[i+1] when slt finds
  // a[i+1] < a[i]; passes repeat until one makes no swap. The inner loop closes
  // with a backward beq, the outer one with a backward j.
  localparam reg_idx_t R4 = 5'd4, R5 = 5'd5, R6 = 5'd6;
  localparam int unsigned SORT_BASE = 200, SORT_N = 8;

  task automatic build_sort(const ref int vals [SORT_N]);
    for (int i = 0; i < DEPTH; i++) prog[i] = '0;
    prog[8'h00] = enc_i(OP_ADDI, RZ, R5, 16'(SORT_BASE + SORT_N - 1));
    prog[8'h01] = enc_i(OP_ADDI, RZ, R6, 16'd0);       // pass: no swap yet
    prog[8'h02] = enc_i(OP_ADDI, RZ, R1, 16'(SORT_BASE));
    prog[8'h03] = enc_i(OP_BEQ,  R1, R5, 16'd9);       // inner: end of pass -> 0x0d
    prog[8'h04] = enc_i(OP_LW,   R1, R2, 16'd0);
    prog[8'h05] = enc_i(OP_LW,   R1, R3, 16'd1);
    prog[8'h06] = enc_r(FN_SLT,  R3, R2, R4);          // r4 = a[i+1] < a[i]
    prog[8'h07] = enc_i(OP_BEQ,  R4, RZ, 16'd3);       // in order -> 0x0b
    prog[8'h08] = enc_i(OP_SW,   R1, R3, 16'd0);
    prog[8'h09] = enc_i(OP_SW,   R1, R2, 16'd1);
    prog[8'h0a] = enc_i(OP_ADDI, RZ, R6, 16'd1);
    prog[8'h0b] = enc_i(OP_ADDI, R1, R1, 16'd1);
    prog[8'h0c] = enc_i(OP_BEQ,  RZ, RZ, 16'hfff6);    // back to 0x03
    prog[8'h0d] = enc_i(OP_BEQ,  R6, RZ, 16'd1);       // no swap -> halt
    prog[8'h0e] = enc_j(OP_J, 26'd1);                  // back to next pass
    prog[8'h0f] = enc_j(OP_HALT, 26'd0);
    for (int k = 0; k < SORT_N; k++) prog[SORT_BASE + k] = word_t'(vals[k]);
  endtask

  function automatic reg_idx_t rnd_reg();
    int unsigned v = $urandom_range(0, 8);
    return (v == 8) ? RZ : reg_idx_t'(v);
  endfunction

  task automatic build_random(int len);
    int pc_i;
    for (int i = 0; i < DEPTH; i++) prog[i] = (i >= 128) ? $urandom : '0;
    pc_i = 0;
    // give the low registers known, mixed-sign contents
    for (int r = 0; r < 8; r++) begin
      prog[pc_i] = enc_i(OP_ADDI, RZ, reg_idx_t'(r), 16'($urandom_range(0, 65535)));
      pc_i++;
    end
    while (pc_i < len) begin
      int unsigned kind = $urandom_range(0, 11);
      case (kind)
        0: prog[pc_i] = enc_r(FN_ADD, rnd_reg(), rnd_reg(), rnd_reg());
        1: prog[pc_i] = enc_r(FN_SUB, rnd_reg(), rnd_reg(), rnd_reg());
        2: prog[pc_i] = enc_r(FN_AND, rnd_reg(), rnd_reg(), rnd_reg());
        3: prog[pc_i] = enc_r(FN_OR,  rnd_reg(), rnd_reg(), rnd_reg());
        4, 5: prog[pc_i] = enc_r(FN_SLT, rnd_reg(), rnd_reg(), rnd_reg());
        6: prog[pc_i] = enc_i(OP_ADDI, rnd_reg(), rnd_reg(), 16'($urandom_range(0, 65535)));
        7: prog[pc_i] = enc_i(OP_LW, RZ, rnd_reg(), 16'($urandom_range(128, 255)));
        8: prog[pc_i] = enc_i(OP_SW, RZ, rnd_reg(), 16'($urandom_range(128, 253)));
        9, 10: prog[pc_i] = enc_i(OP_BEQ, rnd_reg(), ($urandom_range(0, 2) == 0) ? RZ : rnd_reg(),
                                  16'($urandom_range(0, 3)));
        default: prog[pc_i] = enc_j(OP_J, 26'(pc_i + 1 + $urandom_range(0, 3)));
      endcase
      pc_i++;
    end
    // landing area for the forward jumps, then halt
    for (int k = 0; k < 4; k++) begin
      prog[pc_i] = enc_i(OP_ADDI, rnd_reg(), rnd_reg(), 16'(k));
      pc_i++;
    end
    prog[pc_i] = enc_j(OP_HALT, 26'd0);
  endtask

  initial begin
    rst = 1'b1;
    repeat (3) @(negedge clk);

    for (int n = 0; n <= 12; n++) begin
      build_fib(word_t'(n));
      run_program($sformatf("fib n=%0d", n));
      checks++;
      if (dut.u_mem.mem[255] !== fib(n)) begin
        failures++;
        $display("fib n=%0d: word 255 = %0d, expected %0d", n, dut.u_mem.mem[255], fib(n));
      end
    end

    for (int t = 0; t < 6; t++) begin
      int vals [SORT_N];
      int want [SORT_N];
      // test 0 is reversed, the rest random in -1000..1000 (no overflow in slt)
      foreach (vals[k]) vals[k] = (t == 0) ? int'(SORT_N - k) * 3 - 10
                                           : int'($urandom_range(0, 2000)) - 1000;
      // expected result: insertion sort on signed values
      want = vals;
      for (int a = 1; a < SORT_N; a++)
        for (int b = a; b > 0 && want[b] < want[b-1]; b--) begin
          int tmp;
          tmp = want[b]; want[b] = want[b-1]; want[b-1] = tmp;
        end
      build_sort(vals);
      run_program($sformatf("sort %0d", t));
      foreach (want[k]) begin
        checks++;
        if (dut.u_mem.mem[SORT_BASE + k] !== word_t'(want[k])) begin
          failures++;
          $display("sort %0d: word %0d = %0d, expected %0d", t, SORT_BASE + k,
                   $signed(dut.u_mem.mem[SORT_BASE + k]), want[k]);
        end
      end
    end

    for (int t = 0; t < 40; t++) begin
      build_random(60 + (t % 4) * 10);
      run_program($sformatf("random %0d", t));
    end

    $display("mechanisms: rtype=%0d addi=%0d slt<=%0d slt>=%0d lw=%0d sw=%0d beq_taken=%0d beq_not=%0d j=%0d halt=%0d",
             n_rtype, n_addi, n_slt_lt, n_slt_ge, n_lw, n_sw, n_beq_taken, n_beq_not, n_j, n_halt);
    checks++; if (n_rtype == 0)     begin failures++; $display("no R-type ALU op ran"); end
    checks++; if (n_addi == 0)      begin failures++; $display("no addi ran"); end
    checks++; if (n_slt_lt == 0)    begin failures++; $display("no slt with rs < rt ran"); end
    checks++; if (n_slt_ge == 0)    begin failures++; $display("no slt with rs >= rt ran"); end
    checks++; if (n_lw == 0)        begin failures++; $display("no lw ran"); end
    checks++; if (n_sw == 0)        begin failures++; $display("no sw ran"); end
    checks++; if (n_beq_taken == 0) begin failures++; $display("no taken beq ran"); end
    checks++; if (n_beq_not == 0)   begin failures++; $display("no untaken beq ran"); end
    checks++; if (n_j == 0)         begin failures++; $display("no j ran"); end
    checks++; if (n_halt == 0)      begin failures++; $display("no halt ran"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
