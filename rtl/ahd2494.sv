// ahd2494: the AHD-2494 24-bit RISC processor, top level.
//
// A von Neumann machine: instructions and data share one external memory,
// reached over 24 multiplexed address/data pins (see ahd_bus_if). Words,
// registers and addresses are 24 bits wide; memory is word addressed
// (16 Mwords). The pipeline has three stages and no interlocks or
// forwarding:
//
//   1 fetch    the bus reads the word at PC; PC <= PC + 1
//   2 decode   ahd_decoder splits the word; the register file is read
//   3 execute  ALU + barrel shifter result written to Rdest, flags set if
//              the c bit is 1; Rbase + offset (ahd_agu) gives the address
//              of a memory/I/O access or the target of a transfer; the
//              condition is checked against the flags
//
// One instruction completes per processor cycle (state T0 of ahd_control).
// Programming rules that follow from the pipeline:
//   - A result written in cycle n is read by the register file from cycle
//     n+1 on: the instruction right after a producer still sees the old
//     value. The flags, in contrast, are seen by the very next instruction.
//   - LOAD, STORE, IN and OUT hold the pipeline for one extra cycle (TM),
//     in which the bus carries the data. The instruction right after a LOAD
//     does not see the loaded value.
//   - A taken transfer discards the two instructions behind it.
//
// Operating-system support: reset starts in system mode at address 0.
// While the PC-copy bit is set, R15 is loaded every cycle with the address
// of the instruction that has just been fetched, so an instruction that
// reads R15 gets its own address (PC-relative base). A taken CALL, RET or
// SYS stops the copy (R15 then holds the address after the CALL), writes
// its target Rbase + offset to R13, enters system mode and jumps to its
// vector (ahd_pkg::CALL_VEC, RET_VEC, SYS_VEC). The system code performs
// the call or return and leaves with SRET, which jumps to Rbase + offset,
// returns to user mode and restarts the copy. IN, OUT and SRET are NOPs in
// user mode, and user code cannot write R8..R15.
//
// Clocking: clk runs at twice the processor rate; each processor cycle is
// an address phase and a data phase. All state changes on the rising edge
// that ends the data phase.
//
// The architecture, instruction set, pipeline depth, memory stall, R15/R13
// mechanism and bus multiplexing follow the published design; the exact
// pipeline timing, the flush on taken transfers, the vectors and the pin
// protocol are this design's choices.
module ahd2494
  import ahd_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [XLEN-1:0] ad_in,
  output logic [XLEN-1:0] ad_out,
  output logic            ad_oe,
  output logic            ale,
  output logic            rd_n,
  output logic            wr_n,
  output logic            io_n
);

  // ---------------------------------------------------------------- bus
  logic  ph, ce;
  word_t bus_addr, bus_wdata, bus_rdata;
  logic  bus_write, bus_io;

  ahd_bus_if u_bus (
    .clk, .rst_n, .ph, .ce,
    .addr(bus_addr), .wdata(bus_wdata), .write(bus_write), .io(bus_io),
    .rdata(bus_rdata),
    .ad_in, .ad_out, .ad_oe, .ale, .rd_n, .wr_n, .io_n
  );

  // ------------------------------------------------------- control unit
  logic in_tm, advance, flush, ex_mem, ex_redirect;

  ahd_control u_ctrl (
    .clk, .rst_n, .ce, .ex_mem, .ex_redirect, .in_tm, .advance, .flush
  );

  // ---------------------------------------------------- pipeline state
  word_t pc;          // fetch address
  word_t ifid_ir;     // stage 2 instruction
  logic  ifid_valid;
  dec_t  ex_dec;      // stage 3 decoded instruction
  word_t ex_a, ex_b;  // stage 3 operands (port A, port B)

  // memory/I/O transfer waiting for state TM
  word_t mar, mwdata;
  reg_t  mrd;
  logic  mwe, mwrite, mio;

  // ----------------------------------------------------- PSW
  logic   set_flags, enter_sys, leave_sys, cond_true, sys_mode, pc_copy;
  flags_t flags, flags_in;

  // ---------------------------------------------------- stage 2: decode
  dec_t  id_dec;
  word_t rd_a, rd_b;

  ahd_decoder u_dec (
    .ir(ifid_ir), .valid(ifid_valid), .sys_mode, .dec(id_dec)
  );

  // ---------------------------------------------------- register file
  logic  rf_we, rf_copy;
  reg_t  rf_wa;
  word_t rf_wd;

  ahd_regfile u_rf (
    .clk, .rst_n, .ce,
    .ra_a(id_dec.ra), .rd_a, .ra_b(id_dec.rb), .rd_b,
    .we(rf_we), .wa(rf_wa), .wd(rf_wd),
    .pc_copy_en(rf_copy), .pc_copy_val(pc)
  );

  // ---------------------------------------------------- stage 3: execute
  word_t  alu_y, result, ea;
  logic   alu_c, alu_v;
  logic   ex_xfer, ex_trap;

  ahd_alu u_alu (
    .a(ex_a), .b(ex_b), .op(ex_dec.alu_op), .y(alu_y), .c_out(alu_c), .v_out(alu_v)
  );

  ahd_shifter u_sh (.din(alu_y), .sh(ex_dec.shift), .dout(result));

  ahd_agu u_agu (.base(ex_a), .offset(ex_dec.offset), .ea);

  ahd_psw u_psw (
    .clk, .rst_n, .ce, .set_flags, .flags_in, .enter_sys, .leave_sys,
    .cond(ex_dec.cond), .cond_true, .flags, .sys_mode, .pc_copy
  );

  always_comb begin
    flags_in = '{c: alu_c, z: (result == '0), n: result[XLEN-1], v: alu_v};

    ex_mem  = ex_dec.kind inside {K_LOAD, K_STORE, K_IN, K_OUT};
    ex_xfer = ex_dec.kind inside {K_JUMP, K_CALL, K_RET, K_SYS, K_SRET};
    ex_trap = ex_dec.kind inside {K_CALL, K_RET, K_SYS};
    ex_redirect = ex_xfer && cond_true;

    set_flags = advance && ex_dec.kind == K_ALU && ex_dec.set_flags;
    enter_sys = advance && ex_trap && cond_true;
    leave_sys = advance && ex_dec.kind == K_SRET && cond_true;

    // register file write port: load data in TM, otherwise stage 3
    rf_we = 1'b0;
    rf_wa = ex_dec.rd;
    rf_wd = result;
    if (in_tm) begin
      rf_we = mwe;
      rf_wa = mrd;
      rf_wd = bus_rdata;
    end else if (ex_dec.kind == K_ALU) begin
      rf_we = ex_dec.we;
    end else if (enter_sys) begin
      rf_we = 1'b1;
      rf_wa = R_DEST;
      rf_wd = ea;
    end
    rf_copy = advance && pc_copy && !enter_sys;

    // bus: data transfer in TM, instruction fetch otherwise
    bus_addr  = in_tm ? mar : pc;
    bus_wdata = mwdata;
    bus_write = in_tm && mwrite;
    bus_io    = in_tm && mio;
  end

  // ------------------------------------------------- pipeline registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc         <= RESET_VEC;
      ifid_ir    <= '0;
      ifid_valid <= 1'b0;
      ex_dec     <= '0;
      ex_a       <= '0;
      ex_b       <= '0;
      mar        <= '0;
      mwdata     <= '0;
      mrd        <= '0;
      mwe        <= 1'b0;
      mwrite     <= 1'b0;
      mio        <= 1'b0;
    end else if (ce && advance) begin
      if (ex_mem) begin
        mar    <= ea;
        mwdata <= ex_b;
        mrd    <= ex_dec.rd;
        mwe    <= ex_dec.we;
        mwrite <= ex_dec.kind inside {K_STORE, K_OUT};
        mio    <= ex_dec.kind inside {K_IN, K_OUT};
      end
      if (flush) begin
        unique case (ex_dec.kind)
          K_CALL:  pc <= CALL_VEC;
          K_RET:   pc <= RET_VEC;
          K_SYS:   pc <= SYS_VEC;
          default: pc <= ea;
        endcase
        ifid_valid <= 1'b0;
        ex_dec     <= '0;
      end else begin
        pc         <= pc + 1'b1;
        ifid_ir    <= bus_rdata;
        ifid_valid <= 1'b1;
        ex_dec     <= id_dec;
        ex_a       <= rd_a;
        ex_b       <= rd_b;
      end
    end
  end

endmodule
