// tb_ahd2494_mult: the shift-and-add multiplication workload on the
// AHD-2494 at its default parameters.
//
// The processor has no multiply instruction; a 13-word program multiplies
// two 24-bit words from memory, keeping the low 24 bits of the product:
//
//   0  LOAD R1,[R0+0x300]     multiplicand A
//   1  LOAD R2,[R0+0x301]     multiplier B
//   2  LOAD R3,[R0+0x302]     constant 1
//   3  ADD  R4,R0,R0          product = 0
//   4  ADD  R0,R0,R0          NOP
//   5  AND  R6,R2,R3 (c)      Z = low bit of B is 0
//   6  JUMP EQ,[R0+8]
//   7  ADD  R4,R4,R1          product += A
//   8  ADD  R1,R1,R0 <<1      A <<= 1
//   9  ADD  R2,R2,R0 >>1 (c)  B >>= 1, Z = (B == 0)
//  10  JUMP NE,[R0+5]
//  11  STORE R4,[R0+0x310]
//  12  JUMP AL,[R15+0]        stop (jump to itself)
//
// For several operand pairs (zero, one, all ones, random) the processor is
// reset and run; the stored product is checked against A*B mod 2^24, and
// the processor cycles from the first loop iteration to the store are
// checked against the pipeline timing: 8 cycles for an iteration with a 1
// bit (both transfers: one taken), 9 with a 0 bit (two taken transfers),
// and 6 + 3 for the last iteration and the store.
module tb_ahd2494_mult;
  import ahd_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [23:0] ad_in, ad_out;
  logic        ad_oe, ale, rd_n, wr_n, io_n;
  int checks = 0, failures = 0;

  ahd2494 dut (.*);
  ahd_mem_model #(.DEPTH(1024)) mem (.clk, .ad_out, .ad_oe, .ale, .rd_n, .wr_n, .io_n, .ad_in);

  always #5 clk = ~clk;

  function automatic word_t LD(int rd, int off);
    return enc_cf(T_CF, CF_LOAD, 4'(rd), 4'd0, 11'(off));
  endfunction

  int unsigned cyc = 0, t_loop = 0, t_store = 0;
  bit started = 0, stored = 0;

  always @(posedge clk) if (rst_n && dut.ce) begin
    cyc <= cyc + 1;
    if (!started && dut.advance && dut.pc == 24'd5) begin started = 1; t_loop = cyc; end
    if (!stored && !dut.wr_n && mem.alat == 24'h310) begin stored = 1; t_store = cyc; end
  end

  task automatic run(logic [23:0] a, logic [23:0] b);
    int unsigned exp_cyc, bb, t0;
    logic [23:0] exp_p;
    rst_n = 1'b0;
    mem.mem['h300] = a; mem.mem['h301] = b; mem.mem['h302] = 24'd1; mem.mem['h310] = 24'hDEAD00;
    started = 0; stored = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    t0 = cyc;
    for (int i = 0; i < 2000 && !stored; i++) @(posedge clk);
    exp_p = 24'(longint'(a) * longint'(b));
    checks++;
    if (mem.mem['h310] !== exp_p) begin
      failures++;
      $display("FAIL %06h * %06h: got %06h expected %06h", a, b, mem.mem['h310], exp_p);
    end
    // expected cycle count from the loop entry to the store
    exp_cyc = 0; bb = b;
    if (bb == 0) exp_cyc = 9 - 2;
    while (bb != 0) begin
      if ((bb >> 1) == 0) exp_cyc += 6;
      else exp_cyc += (bb & 1) ? 8 : 9;
      bb >>= 1;
    end
    exp_cyc += 3;
    checks++;
    if (t_store - t_loop != exp_cyc) begin
      failures++;
      $display("FAIL %06h * %06h: %0d cycles, expected %0d", a, b, t_store - t_loop, exp_cyc);
    end
    $display("%06h * %06h = %06h in %0d processor cycles from reset (%0.1f us at 10 MHz)",
             a, b, mem.mem['h310], t_store - t0, (t_store - t0) / 10.0);
  endtask

  initial begin
    #1;
    mem.mem[0]  = LD(1, 'h300);
    mem.mem[1]  = LD(2, 'h301);
    mem.mem[2]  = LD(3, 'h302);
    mem.mem[3]  = enc_alu(OP_ADD, 4'd4, 4'd0, 4'd0, 1'b0, 6'd0);
    mem.mem[4]  = enc_alu(OP_ADD, 4'd0, 4'd0, 4'd0, 1'b0, 6'd0);
    mem.mem[5]  = enc_alu(OP_AND, 4'd6, 4'd2, 4'd3, 1'b1, 6'd0);
    mem.mem[6]  = enc_cf(T_CF, CF_JUMP, C_EQ, 4'd0, 11'd8);
    mem.mem[7]  = enc_alu(OP_ADD, 4'd4, 4'd4, 4'd1, 1'b0, 6'd0);
    mem.mem[8]  = enc_alu(OP_ADD, 4'd1, 4'd1, 4'd0, 1'b0, 6'b00_0001);
    mem.mem[9]  = enc_alu(OP_ADD, 4'd2, 4'd2, 4'd0, 1'b1, 6'b10_0001);
    mem.mem[10] = enc_cf(T_CF, CF_JUMP, C_NE, 4'd0, 11'd5);
    mem.mem[11] = enc_cf(T_CF, CF_STORE, 4'd4, 4'd0, 11'h310);
    mem.mem[12] = enc_cf(T_CF, CF_JUMP, C_AL, 4'd15, 11'd0);
    run(24'd6, 24'd7);
    run(24'd12345, 24'd0);
    run(24'd1, 24'd1);
    run(24'hFFFFFF, 24'hFFFFFF);
    run(24'd1000, 24'd999);
    for (int k = 0; k < 6; k++) run(24'($urandom), 24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 60000; i++) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
