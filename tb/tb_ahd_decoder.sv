// tb_ahd_decoder: self-checking test of the AHD-2494 instruction decoder.
//
// Builds instruction words bit by bit from the format table (not through
// the shared encoders) and checks the decoded class, register selects,
// write enable, flag bit, shift, condition and offset. Covers every opcode
// of the three implemented types in both modes, the floating-point type,
// invalid slots, unused opcodes, the privileged-instruction rule and the
// protection of R8..R15 and R0 against writes.
module tb_ahd_decoder;
  import ahd_pkg::*;

  logic        clk = 1'b0;
  logic [23:0] ir;
  logic        valid, sys_mode;
  dec_t        dec;
  int checks = 0, failures = 0;

  ahd_decoder dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s (ir %06h sys %0b): got %0d expected %0d", what, ir, sys_mode, got, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < 3000; k++) begin
      logic [1:0] t; logic [2:0] op; logic [3:0] f1, f2, f3; logic c; logic [5:0] sh;
      kind_e ek; int ewe;
      t = 2'($urandom); op = 3'($urandom);
      f1 = 4'($urandom); f2 = 4'($urandom); f3 = 4'($urandom);
      c = 1'($urandom); sh = 6'($urandom);
      ir = {t, op, f1, f2, f3, c, sh};
      valid = ($urandom_range(0, 9) != 0);
      sys_mode = 1'($urandom);
      #1;
      ek = K_NOP; ewe = 0;
      if (valid) begin
        if (t == 2'b00 && op != 3'd7) begin ek = K_ALU; ewe = 1; end
        if (t == 2'b10) begin
          case (op)
            3'd0: begin ek = K_LOAD; ewe = 1; end
            3'd1: ek = K_STORE;
            3'd2: ek = K_JUMP;
            3'd3: ek = K_CALL;
            3'd4: ek = K_RET;
            3'd5: ek = K_SYS;
            default: ek = K_NOP;
          endcase
        end
        if (t == 2'b11 && sys_mode) begin
          case (op)
            3'd0: begin ek = K_IN; ewe = 1; end
            3'd1: ek = K_OUT;
            3'd2: ek = K_SRET;
            default: ek = K_NOP;
          endcase
        end
      end
      if (f1 == 0 || (!sys_mode && f1 >= 8)) ewe = 0;
      chk("kind", int'(dec.kind), int'(ek));
      chk("we", int'(dec.we), ewe);
      chk("ra", int'(dec.ra), int'(f2));
      chk("rb", int'(dec.rb), (t == 2'b00) ? int'(f3) : int'(f1));
      chk("offset", int'(dec.offset), int'({f3, c, sh}));
      chk("cond", int'(dec.cond), int'(f1));
      if (ek == K_ALU) begin
        chk("rd", int'(dec.rd), int'(f1));
        chk("alu_op", int'(dec.alu_op), int'(op));
        chk("set_flags", int'(dec.set_flags), int'(c));
        chk("shift", int'(dec.shift), int'(sh));
      end else begin
        chk("set_flags off", int'(dec.set_flags), 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100000; i++) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
