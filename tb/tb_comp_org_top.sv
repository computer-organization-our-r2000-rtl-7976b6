// tb_comp_org_top: end-to-end test of the whole design at its default sizes.
//
// Processor: runs the Fibonacci program (n in word 254, result to word 255)
// for n = 0..12 and a short program using sub and and, checking the stored
// results against values computed here. A monitor times every instruction from
// its fetch to the next fetch and checks the cycle count for its kind (3 for
// add/sub/and/or/addi/j and a not-taken beq, 4 for slt, sw and a taken beq, 5
// for lw), and counts each control sequence: both slt outcomes, beq taken and
// not taken, lw, sw, j, halt. A sequence that never ran is a failure.
// Side blocks: register transfers on the shared bus, the multiplexed bus and
// point-to-point (including a one-clock swap), a simultaneous read and write of
// the 4 x 4 register file, a write and read-back of the static RAM, and a
// 32-bit addition with carry out.
`timescale 1ns/1ps
module tb_comp_org_top;
  import r2000_pkg::*;

  logic clk = 0, rst;
  logic cpu_halted;
  word_t cpu_pc, cpu_ir;
  state_e cpu_state;
  logic [3:0] bus_ld, bus_oe;
  logic bus_ext_oe;
  logic [7:0] bus_ext_d, bus_value;
  logic [3:0] mux_ld;
  logic [2:0] mux_src;
  logic [7:0] mux_ext_d, mux_bus;
  logic [7:0] mux_r [4];
  logic [3:0] p2p_ld;
  logic [2:0] p2p_sel [4];
  logic [7:0] p2p_ext_d;
  logic [7:0] p2p_r [4];
  logic rf_ren, rf_wen, rf_q_en;
  logic [1:0] rf_raddr, rf_waddr;
  logic [3:0] rf_d, rf_q;
  logic [9:0] sram_a;
  logic sram_rd, sram_wr, sram_io_oe;
  logic [3:0] sram_io_in, sram_io_out;
  logic [31:0] add_a, add_b, add_sum;
  logic add_cin, add_cout;

  int checks = 0, failures = 0;

  comp_org_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- instruction timing monitor ----------------
  int n_rtype = 0, n_slt_lt = 0, n_slt_ge = 0, n_lw = 0, n_sw = 0;
  int n_beq_taken = 0, n_beq_not = 0, n_addi = 0, n_j = 0, n_halt = 0;
  int len = 0;
  logic saw_exe2 = 0, monitor_on = 0;

  always @(posedge clk) begin
    if (rst || !monitor_on) begin
      len = 0;
      saw_exe2 = 0;
    end else begin
      if (cpu_state == S_FETCH && len != 0) begin
        // the instruction in IR has just finished
        int expect_len;
        logic [5:0] opc, fnc;
        opc = cpu_ir[31:26]; fnc = cpu_ir[5:0];
        case (opc)
          6'h00: if (fnc == 6'h2a) begin
                   expect_len = 4;
                   if (saw_exe2) n_slt_lt++; else n_slt_ge++;
                 end else begin expect_len = 3; n_rtype++; end
          6'h23: begin expect_len = 5; n_lw++; end
          6'h2b: begin expect_len = 4; n_sw++; end
          6'h04: if (saw_exe2) begin expect_len = 4; n_beq_taken++; end
                 else begin expect_len = 3; n_beq_not++; end
          6'h08: begin expect_len = 3; n_addi++; end
          6'h02: begin expect_len = 3; n_j++; end
          default: expect_len = -1;
        endcase
        checks++;
        if (len != expect_len) begin
          failures++;
          $display("instruction %h took %0d cycles, expected %0d", cpu_ir, len, expect_len);
        end
        len = 0;
        saw_exe2 = 0;
      end
      if (cpu_state == S_EXECUTE2) saw_exe2 = 1;
      len++;
    end
  end

  // ---------------- processor programs ----------------
  localparam reg_idx_t R0 = 5'd0, R1 = 5'd1, R2 = 5'd2, R3 = 5'd3, R4 = 5'd4, RZ = 5'd31;

  task automatic clear_mem();
    for (int i = 0; i < 256; i++) dut.u_cpu.u_mem.mem[i] = '0;
  endtask

  task automatic load_fib(word_t n);
    clear_mem();
    dut.u_cpu.u_mem.mem[8'h00] = enc_i(OP_ADDI, RZ, R1, 16'd0);
    dut.u_cpu.u_mem.mem[8'h01] = enc_i(OP_ADDI, RZ, R2, 16'd1);
    dut.u_cpu.u_mem.mem[8'h02] = enc_i(OP_LW,   RZ, R0, 16'd254);
    dut.u_cpu.u_mem.mem[8'h03] = enc_r(FN_SLT,  RZ, R0, R3);
    dut.u_cpu.u_mem.mem[8'h04] = enc_i(OP_BEQ,  R3, RZ, 16'd9);
    dut.u_cpu.u_mem.mem[8'h05] = enc_i(OP_BEQ,  RZ, RZ, 16'd2);
    dut.u_cpu.u_mem.mem[8'h06] = enc_r(FN_ADD,  R1, R2, R1);
    dut.u_cpu.u_mem.mem[8'h07] = enc_i(OP_ADDI, R0, R0, 16'hffff);
    dut.u_cpu.u_mem.mem[8'h08] = enc_i(OP_BEQ,  R0, RZ, 16'd4);
    dut.u_cpu.u_mem.mem[8'h09] = enc_r(FN_ADD,  R2, R1, R2);
    dut.u_cpu.u_mem.mem[8'h0a] = enc_i(OP_ADDI, R0, R0, 16'hffff);
    dut.u_cpu.u_mem.mem[8'h0b] = enc_i(OP_BEQ,  R0, RZ, 16'd2);
    dut.u_cpu.u_mem.mem[8'h0c] = enc_j(OP_J, 26'd6);
    dut.u_cpu.u_mem.mem[8'h0d] = enc_r(FN_OR,   R1, RZ, R2);
    dut.u_cpu.u_mem.mem[8'h0e] = enc_i(OP_SW,   RZ, R2, 16'd255);
    dut.u_cpu.u_mem.mem[8'h0f] = enc_j(OP_HALT, 26'd0);
    dut.u_cpu.u_mem.mem[8'hfe] = n;
  endtask

  task automatic run_cpu(string name);
    int cycles = 0;
    @(negedge clk);
    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    monitor_on = 1;
    while (!cpu_halted && cycles < 20000) begin
      @(negedge clk);
      cycles++;
    end
    monitor_on = 0;
    n_halt += cpu_halted;
    checks++;
    if (!cpu_halted) begin failures++; $display("%s: did not halt", name); end
  endtask

  function automatic word_t fib(int n);
    word_t x = 0, y = 1, t;
    for (int k = 2; k <= n; k++) begin t = x + y; x = y; y = t; end
    return y;
  endfunction

  // ---------------- side blocks ----------------
  int n_bus_xfer = 0, n_mux_xfer = 0, n_p2p_swap = 0, n_rf_rw = 0, n_sram_rw = 0, n_add_carry = 0;

  task automatic side_blocks();
    logic [7:0] v0, v1;
    // shared bus: external -> R0, R0 -> R2, read R2
    @(negedge clk);
    bus_ext_oe = 1; bus_ext_d = 8'h5a; bus_ld = 4'b0001;
    @(negedge clk);
    bus_ext_oe = 0; bus_oe = 4'b0001; bus_ld = 4'b0100;
    @(negedge clk);
    bus_oe = 4'b0100; bus_ld = 4'b0000;
    #1 checks++;
    if (bus_value !== 8'h5a) begin failures++; $display("bus transfer: %h", bus_value); end
    else n_bus_xfer++;
    @(negedge clk);
    bus_oe = 0;
    // multiplexed bus: external -> R3, R3 -> R1
    mux_src = 4; mux_ext_d = 8'hc3; mux_ld = 4'b1000;
    @(negedge clk);
    mux_src = 3; mux_ld = 4'b0010;
    @(negedge clk);
    mux_ld = 0;
    checks++;
    if (mux_r[1] !== 8'hc3 || mux_r[3] !== 8'hc3) begin
      failures++; $display("mux transfer: R1 %h R3 %h", mux_r[1], mux_r[3]);
    end else n_mux_xfer++;
    // point-to-point: load R0, R1, then swap them in one clock
    p2p_ld = 4'b0001; p2p_sel[0] = 4; p2p_ext_d = 8'h11;
    @(negedge clk);
    p2p_ld = 4'b0010; p2p_sel[1] = 4; p2p_ext_d = 8'h22;
    @(negedge clk);
    v0 = p2p_r[0]; v1 = p2p_r[1];
    p2p_ld = 4'b0011; p2p_sel[0] = 1; p2p_sel[1] = 0;
    @(negedge clk);
    p2p_ld = 0;
    checks++;
    if (p2p_r[0] !== 8'h22 || p2p_r[1] !== 8'h11 || v0 !== 8'h11 || v1 !== 8'h22) begin
      failures++; $display("p2p swap: R0 %h R1 %h", p2p_r[0], p2p_r[1]);
    end else n_p2p_swap++;
    // register file: write word 2, then read word 2 while writing word 3
    rf_wen = 1; rf_waddr = 2; rf_d = 4'h9;
    @(negedge clk);
    rf_waddr = 3; rf_d = 4'h6; rf_ren = 1; rf_raddr = 2;
    #1 checks++;
    if (rf_q !== 4'h9 || !rf_q_en) begin failures++; $display("regfile read: %h", rf_q); end
    @(negedge clk);
    rf_wen = 0; rf_raddr = 3;
    #1 checks++;
    if (rf_q !== 4'h6) begin failures++; $display("regfile read 3: %h", rf_q); end
    else n_rf_rw++;
    rf_ren = 0;
    // static RAM: write word 777, read it back
    @(negedge clk);
    sram_a = 10'd777; sram_wr = 1; sram_io_in = 4'hb;
    @(negedge clk);
    sram_wr = 0; sram_rd = 1;
    #1 checks++;
    if (sram_io_out !== 4'hb || !sram_io_oe) begin failures++; $display("sram: %h", sram_io_out); end
    else n_sram_rw++;
    @(negedge clk);
    sram_rd = 0;
    // adder with carry out
    add_a = 32'hffff_fff0; add_b = 32'h0000_0013; add_cin = 1;
    #1 checks++;
    if ({add_cout, add_sum} !== 33'h1_0000_0004) begin
      failures++; $display("adder: %h %h", add_cout, add_sum);
    end else n_add_carry++;
  endtask

  initial begin
    rst = 1;
    bus_ld = 0; bus_oe = 0; bus_ext_oe = 0; bus_ext_d = 0;
    mux_ld = 0; mux_src = 4; mux_ext_d = 0;
    p2p_ld = 0; p2p_ext_d = 0;
    for (int r = 0; r < 4; r++) p2p_sel[r] = 4;
    rf_ren = 0; rf_wen = 0; rf_raddr = 0; rf_waddr = 0; rf_d = 0;
    sram_a = 0; sram_rd = 0; sram_wr = 0; sram_io_in = 0;
    add_a = 0; add_b = 0; add_cin = 0;
    repeat (3) @(negedge clk);

    // n = 0 stores the starting value 1 (slt finds 0 < n false)
    for (int n = 0; n <= 12; n++) begin
      load_fib(word_t'(n));
      run_cpu($sformatf("fib %0d", n));
      checks++;
      if (dut.u_cpu.u_mem.mem[255] !== ((n == 0) ? 1 : fib(n))) begin
        failures++;
        $display("fib %0d: %0d, expected %0d", n, dut.u_cpu.u_mem.mem[255], fib(n));
      end else $display("fib %0d = %0d", n, dut.u_cpu.u_mem.mem[255]);
    end

    // sub and and: 100 - 58 = 42 to word 200, 100 & 58 = 32 to word 201
    clear_mem();
    dut.u_cpu.u_mem.mem[0] = enc_i(OP_ADDI, RZ, R1, 16'd100);
    dut.u_cpu.u_mem.mem[1] = enc_i(OP_ADDI, RZ, R2, 16'd58);
    dut.u_cpu.u_mem.mem[2] = enc_r(FN_SUB, R1, R2, R3);
    dut.u_cpu.u_mem.mem[3] = enc_r(FN_AND, R1, R2, R4);
    dut.u_cpu.u_mem.mem[4] = enc_i(OP_SW, RZ, R3, 16'd200);
    dut.u_cpu.u_mem.mem[5] = enc_i(OP_SW, RZ, R4, 16'd201);
    dut.u_cpu.u_mem.mem[6] = enc_j(OP_HALT, 26'd0);
    run_cpu("sub/and");
    checks++;
    if (dut.u_cpu.u_mem.mem[200] !== 32'd42 || dut.u_cpu.u_mem.mem[201] !== 32'd32) begin
      failures++;
      $display("sub/and: %0d %0d", dut.u_cpu.u_mem.mem[200], dut.u_cpu.u_mem.mem[201]);
    end

    side_blocks();

    $display("processor: rtype=%0d addi=%0d slt<=%0d slt>=%0d lw=%0d sw=%0d beq_taken=%0d beq_not=%0d j=%0d halt=%0d",
             n_rtype, n_addi, n_slt_lt, n_slt_ge, n_lw, n_sw, n_beq_taken, n_beq_not, n_j, n_halt);
    $display("side blocks: bus=%0d mux=%0d p2p_swap=%0d regfile_rw=%0d sram_rw=%0d adder_carry=%0d",
             n_bus_xfer, n_mux_xfer, n_p2p_swap, n_rf_rw, n_sram_rw, n_add_carry);
    checks++; if (n_rtype == 0)     begin failures++; $display("no R-type ALU op"); end
    checks++; if (n_addi == 0)      begin failures++; $display("no addi"); end
    checks++; if (n_slt_lt == 0)    begin failures++; $display("no slt rs < rt"); end
    checks++; if (n_slt_ge == 0)    begin failures++; $display("no slt rs >= rt"); end
    checks++; if (n_lw == 0)        begin failures++; $display("no lw"); end
    checks++; if (n_sw == 0)        begin failures++; $display("no sw"); end
    checks++; if (n_beq_taken == 0) begin failures++; $display("no taken beq"); end
    checks++; if (n_beq_not == 0)   begin failures++; $display("no untaken beq"); end
    checks++; if (n_j == 0)         begin failures++; $display("no j"); end
    checks++; if (n_halt == 0)      begin failures++; $display("no halt"); end
    checks++; if (n_bus_xfer == 0 || n_mux_xfer == 0 || n_p2p_swap == 0 || n_rf_rw == 0
                  || n_sram_rw == 0 || n_add_carry == 0) begin
      failures++; $display("a side-block operation never completed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
