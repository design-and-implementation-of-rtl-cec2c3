// ahd_decoder: instruction decoder of the AHD-2494 (pipeline stage 2).
//
// Splits a 24-bit instruction word into the fields of ahd_pkg::dec_t and
// classifies it. Combinational. Rules applied here:
//   - ALU instructions read Rop1 on port A and Rop2 on port B and write
//     Rdest. Control-flow and system instructions read Rbase on port A and
//     Rs/d on port B (the value stored by STORE and OUT).
//   - An invalid slot (valid = 0), a type-01 floating-point word, and an
//     unused opcode decode as NOP.
//   - IN, OUT and SRET are privileged: in user mode they decode as NOP.
//   - R8..R15 belong to the operating system: a user-mode instruction that
//     names one of them as destination does not write it (reads are free,
//     so user code can use R15 as a PC-relative base).
//   - R0 as destination never writes.
// CALL, RET and SYS write their target address to R13 in hardware; this
// is not subject to the protection rule.
//
// The formats, the privileged-instruction rule and the protection of the
// system registers follow the published architecture; that the system
// registers are R8..R15 and that protection blocks writes (not reads) are
// this design's choices.
module ahd_decoder
  import ahd_pkg::*;
(
  input  logic  [XLEN-1:0] ir,
  input  logic             valid,
  input  logic             sys_mode,
  output dec_t             dec
);

  logic [1:0] t;
  logic [2:0] op;

  always_comb begin
    t  = ir[23:22];
    op = ir[21:19];

    dec           = '0;
    dec.kind      = K_NOP;
    dec.alu_op    = alu_op_e'(op);
    dec.ra        = ir[14:11];
    dec.rb        = (itype_e'(t) == T_ALU) ? ir[10:7] : ir[18:15];
    dec.rd        = ir[18:15];
    dec.shift     = ir[5:0];
    dec.cond      = cond_e'(ir[18:15]);
    dec.offset    = ir[OFFW-1:0];

    if (valid) begin
      unique case (itype_e'(t))
        T_ALU: begin
          if (op != 3'b111) begin
            dec.kind      = K_ALU;
            dec.we        = 1'b1;
            dec.set_flags = ir[6];
          end
        end
        T_CF: begin
          unique case (op)
            CF_LOAD:  begin dec.kind = K_LOAD; dec.we = 1'b1; end
            CF_STORE: dec.kind = K_STORE;
            CF_JUMP:  dec.kind = K_JUMP;
            CF_CALL:  dec.kind = K_CALL;
            CF_RET:   dec.kind = K_RET;
            CF_SYS:   dec.kind = K_SYS;
            default:  dec.kind = K_NOP;
          endcase
        end
        T_SYS: begin
          if (sys_mode) begin
            unique case (op)
              SY_IN:   begin dec.kind = K_IN; dec.we = 1'b1; end
              SY_OUT:  dec.kind = K_OUT;
              SY_SRET: dec.kind = K_SRET;
              default: dec.kind = K_NOP;
            endcase
          end
        end
        default: dec.kind = K_NOP;  // floating point: not in this variant
      endcase
    end

    if (dec.rd == R_ZERO || (!sys_mode && dec.rd >= reg_t'(SYSREG)))
      dec.we = 1'b0;
  end

endmodule
