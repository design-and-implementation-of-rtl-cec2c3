// tb_ahd2494: end-to-end test of the AHD-2494 processor at its default
// parameters.
//
// A small operating system and user program are placed in the memory model
// and run from reset. The program uses every instruction class: loads of
// constants, ALU operations with flag setting and all shift kinds, stores,
// taken and not-taken conditional jumps, a switch to user mode with SRET,
// a user-mode CALL / conditional RET pair, a not-taken CALL, a compare
// into R0, and a SYS call that trap to the system code
// (which uses R13 and R15 to perform them), I/O input and output, a
// privileged instruction and a system-register write attempted in user
// mode, and PC-relative addressing through R15.
//
// Checks: the final registers, memory and I/O ports against values worked
// out by hand from the instruction set; the cycle timing (one instruction
// per cycle, one extra cycle per memory instruction, two lost cycles per
// taken transfer); and that each mechanism (memory stall, flush, mode
// switches, privileged NOP, protected write, R0 discard, PC copy use)
// happened at least once.
module tb_ahd2494;
  import ahd_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [23:0] ad_in, ad_out;
  logic        ad_oe, ale, rd_n, wr_n, io_n;

  int checks = 0, failures = 0;

  ahd2494 dut (.*);
  ahd_mem_model #(.DEPTH(4096)) mem (.clk, .ad_out, .ad_oe, .ale, .rd_n, .wr_n, .io_n, .ad_in);

  always #5 clk = ~clk;

  // --------------------------------------------------------- assembler
  function automatic word_t ALU(alu_op_e op, int rd, int r1, int r2, bit c = 0,
                                logic [5:0] sh = 6'd0);
    return enc_alu(op, reg_t'(rd), reg_t'(r1), reg_t'(r2), c, sh);
  endfunction
  function automatic word_t CF(logic [1:0] t, logic [2:0] op, int x, int rb, int off);
    return enc_cf(t, op, 4'(x), reg_t'(rb), 11'(off));
  endfunction
  localparam word_t NOP = 24'h000000 | {T_ALU, 3'd0, 18'd0};

  task automatic put(int a, word_t w);
    mem.mem[a] = w;
  endtask

  task automatic check(string what, logic [23:0] got, logic [23:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %06h expected %06h", what, got, exp);
    end
  endtask

  // ----------------------------------------------------------- program
  initial begin
    #1;  // after the memory model has cleared itself
    // system code after reset
    put('h000, CF(T_CF, CF_LOAD, 1, 0, 'h300));         // R1 = 5
    put('h001, CF(T_CF, CF_LOAD, 2, 0, 'h301));         // R2 = 7
    put('h002, NOP);
    put('h003, ALU(OP_ADD, 3, 1, 2, 1));                // R3 = 12
    put('h004, ALU(OP_SUB, 4, 1, 2, 1));                // R4 = -2, N=1 C=0
    put('h005, CF(T_CF, CF_JUMP, C_MI, 0, 'h040));      // taken
    put('h006, CF(T_CF, CF_STORE, 1, 0, 'h330));        // discarded
    put('h007, CF(T_CF, CF_STORE, 1, 0, 'h331));        // discarded
    // CALL vector: save the return address, go to the routine in user mode
    put('h010, CF(T_CF, CF_STORE, 15, 0, 'h320));
    put('h011, CF(T_SYS, SY_SRET, C_AL, 13, 0));
    // RET vector: fetch the saved return address and go back
    put('h020, CF(T_CF, CF_LOAD, 14, 0, 'h320));
    put('h021, NOP);
    put('h022, CF(T_SYS, SY_SRET, C_AL, 14, 0));
    // SYS vector: report the service number, return after the SYS
    put('h030, CF(T_SYS, SY_OUT, 13, 0, 7));
    put('h031, CF(T_SYS, SY_SRET, C_AL, 15, 0));
    // system code, continued
    put('h040, CF(T_CF, CF_STORE, 3, 0, 'h310));        // mem[310] = 12
    put('h041, ALU(OP_ADD, 8, 1, 2, 0, 6'b10_0010));    // R8 = 12 >> 2 = 3
    put('h042, ALU(OP_OR, 9, 1, 2, 0, 6'b11_0100));     // R9 = 7 ror 4
    put('h043, ALU(OP_AND, 10, 1, 2, 0, 6'b00_1111));   // R10 = 5 << 15
    put('h044, CF(T_CF, CF_JUMP, C_EQ, 0, 'h060));      // not taken
    put('h045, CF(T_SYS, SY_OUT, 3, 0, 5));             // io[5] = 12
    put('h046, CF(T_SYS, SY_IN, 11, 0, 6));             // R11 = io[6]
    put('h047, ALU(OP_ADD, 12, 11, 0));                 // sees old R11 = 0
    put('h048, CF(T_SYS, SY_SRET, C_AL, 0, 'h100));     // to user mode
    put('h049, ALU(OP_ADD, 13, 1, 1));                  // discarded
    // user program
    put('h100, ALU(OP_ADD, 9, 1, 1));                   // protected: no write
    put('h101, CF(T_SYS, SY_IN, 5, 0, 6));              // privileged: NOP
    put('h102, ALU(OP_ADD, 5, 15, 0));                  // R5 = own address
    put('h103, CF(T_CF, CF_LOAD, 6, 15, 'h1FF));        // R6 = mem[0x302]
    put('h104, CF(T_CF, CF_CALL, C_AL, 0, 'h180));      // call 0x180
    put('h105, ALU(OP_ADD, 7, 1, 2));                   // R7 = 12
    put('h106, CF(T_CF, CF_SYS, C_AL, 0, 'h042));       // service 0x42
    put('h107, ALU(OP_ADD, 4, 0, 2));                   // R4 = 7
    put('h108, CF(T_CF, CF_STORE, 7, 0, 'h311));        // done marker
    put('h109, CF(T_CF, CF_JUMP, C_AL, 15, 0));         // spin here
    // user subroutine
    put('h180, ALU(OP_ADD, 3, 3, 3));                   // R3 = 24
    put('h181, ALU(OP_SUB, 0, 1, 1, 1));                // compare: Z=1 C=1
    put('h182, CF(T_CF, CF_CALL, C_NE, 0, 'h1F0));      // not taken: no trap
    put('h183, CF(T_CF, CF_RET, C_EQ, 0, 0));           // taken
    put('h184, ALU(OP_ADD, 3, 0, 0));                   // discarded
    // data
    put('h300, 24'd5);
    put('h301, 24'd7);
    put('h302, 24'd100);
    mem.io_rd[6] = 24'hABCDEF;
  end

  // ------------------------------------------------- cycle bookkeeping
  int unsigned cyc = 0;
  int unsigned fetch_at [int];
  int n_stall = 0, n_flush = 0, n_enter = 0, n_leave = 0, n_priv_nop = 0;
  int n_prot = 0, n_r0 = 0, n_r15 = 0, n_flags = 0, n_shift = 0;
  bit done = 0;

  always @(posedge clk) if (rst_n && dut.ce) begin
    cyc <= cyc + 1;
    if (dut.advance && !fetch_at.exists(int'(dut.pc))) fetch_at[int'(dut.pc)] = cyc;
    if (dut.in_tm) n_stall++;
    if (dut.flush) n_flush++;
    if (dut.enter_sys) n_enter++;
    if (dut.leave_sys) n_leave++;
    if (dut.set_flags) n_flags++;
    if (dut.advance && dut.ex_dec.kind == K_ALU && dut.ex_dec.shift != 0) n_shift++;
    if (dut.advance && dut.ifid_valid && !dut.sys_mode) begin
      if (dut.ifid_ir[23:22] == 2'b11) n_priv_nop++;
      if (dut.ifid_ir[23:22] == 2'b00 && dut.ifid_ir[18:15] >= 8) n_prot++;
      if (dut.ifid_ir[14:11] == 15) n_r15++;
    end
    if (dut.advance && dut.ex_dec.kind == K_ALU && dut.ex_dec.rd == 0)
      n_r0++;
    if (!dut.wr_n && dut.io_n && mem.alat == 24'h311) done = 1;
    if ($test$plusargs("trace"))
      $display("cyc %0d pc %06h tm %0d ex %s sys %0d r15 %06h", cyc, dut.pc, dut.in_tm,
               dut.ex_dec.kind.name(), dut.sys_mode, dut.u_rf.regs[15]);
  end


  // --------------------------------------------------------- run
  initial begin
    for (int i = 0; i < 4; i++) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000 && !done; i++) @(posedge clk);
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL program did not reach its end marker");
    end
    for (int i = 0; i < 10; i++) @(posedge clk);

    check("R1", dut.u_rf.regs[1], 24'd5);
    check("R2", dut.u_rf.regs[2], 24'd7);
    check("R3", dut.u_rf.regs[3], 24'd24);
    check("R4", dut.u_rf.regs[4], 24'd7);
    check("R5 (own address via R15)", dut.u_rf.regs[5], 24'h102);
    check("R6 (PC-relative load)", dut.u_rf.regs[6], 24'd100);
    check("R7", dut.u_rf.regs[7], 24'd12);
    check("R8 (shift right)", dut.u_rf.regs[8], 24'd3);
    check("R9 (rotate right, protected)", dut.u_rf.regs[9], 24'h700000);
    check("R10 (shift left)", dut.u_rf.regs[10], 24'h028000);
    check("R11 (IN)", dut.u_rf.regs[11], 24'hABCDEF);
    check("R12 (no forwarding)", dut.u_rf.regs[12], 24'd0);
    check("R13 (SYS target)", dut.u_rf.regs[13], 24'h42);
    check("R14 (saved return)", dut.u_rf.regs[14], 24'h105);
    check("mem[310]", mem.mem['h310], 24'd12);
    check("mem[311]", mem.mem['h311], 24'd12);
    check("mem[320] (return address)", mem.mem['h320], 24'h105);
    check("mem[330] (flushed store)", mem.mem['h330], 24'd0);
    check("mem[331] (flushed store)", mem.mem['h331], 24'd0);
    check("io[5]", mem.io_wr[5], 24'd12);
    check("io[7] (SYS service)", mem.io_wr[7], 24'h42);
    check("flags after compare into R0", 24'(dut.u_psw.flags), 24'b1100);
    check("user mode at end", {23'd0, dut.sys_mode}, 24'd0);
    check("user fetched routine", 24'(fetch_at.exists('h180)), 24'd1);
    check("skipped not-taken jump target", 24'(fetch_at.exists('h060)), 24'd0);

    // timing: 0x000 and 0x001 are loads (one extra cycle each)
    check("fetch(1)-fetch(0)", 24'(fetch_at['h001] - fetch_at['h000]), 24'd1);
    check("fetch(3)-fetch(2)", 24'(fetch_at['h003] - fetch_at['h002]), 24'd2);
    check("fetch(4)-fetch(0)", 24'(fetch_at['h004] - fetch_at['h000]), 24'd6);
    // straight-line ALU code: one instruction per cycle
    check("fetch(46)-fetch(43)", 24'(fetch_at['h046] - fetch_at['h043]), 24'd3);
    // taken jump: target fetched three cycles after the jump
    check("fetch(40)-fetch(5)", 24'(fetch_at['h040] - fetch_at['h005]), 24'd3);
    // trap: RET vector fetched three cycles after the conditional RET
    check("fetch(20)-fetch(183)", 24'(fetch_at['h020] - fetch_at['h183]), 24'd3);
    check("not-taken CALL target never fetched", 24'(fetch_at.exists('h1F0)), 24'd0);
    // the STORE at 0x040 holds the fetch of 0x043 for one cycle
    check("fetch(43)-fetch(42)", 24'(fetch_at['h043] - fetch_at['h042]), 24'd2);

    begin
      string names [11] = '{"memory stall", "flush", "enter system", "leave system",
                            "privileged NOP", "protected write", "PC-relative R15",
                            "flag update", "shift", "IN/OUT", "R0 discard"};
      int cnt [11];
      cnt = '{n_stall, n_flush, n_enter, n_leave, n_priv_nop, n_prot, n_r15,
              n_flags, n_shift, int'(mem.io_reads + mem.io_writes), n_r0};
      for (int i = 0; i < 11; i++) begin
        checks++;
        $display("mechanism %-16s happened %0d times", names[i], cnt[i]);
        if (cnt[i] == 0) begin
          failures++;
          $display("FAIL mechanism %s never happened", names[i]);
        end
      end
    end

    $display("processor cycles: %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8000; i++) @(posedge clk);
    failures++;
    $display("FAIL watchdog: program did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
