// ahd_psw: condition code register (program status word) of the AHD-2494.
//
// Holds the four user flags C, Z, N and V, and two bits that only system
// code can see the effect of:
//   sys_mode    1 = operating-system mode, 0 = user mode
//   pc_copy     1 = the PC is copied to R15 every cycle
// All updates happen at the end of a processor cycle (ce). set_flags loads
// the flags from flags_in (the instruction's c bit was set). enter_sys
// (a taken CALL, RET or SYS) sets system mode and stops the PC copy;
// leave_sys (a taken SRET) returns to user mode and restarts the copy.
// Reset selects system mode with the copy on and clears the flags.
//
// cond_true evaluates the 4-bit condition field of a conditional
// instruction against the current flags, combinationally.
//
// The flags, the c bit, the mode bit and the PC-copy bit follow the published
// architecture; the condition encoding (see ahd_pkg::cond_e) and the reset
// state are this design's choices.
module ahd_psw
  import ahd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       set_flags,
  input  flags_t     flags_in,
  input  logic       enter_sys,
  input  logic       leave_sys,
  input  logic [3:0] cond,
  output logic       cond_true,
  output flags_t     flags,
  output logic       sys_mode,
  output logic       pc_copy
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags    <= '0;
      sys_mode <= 1'b1;
      pc_copy  <= 1'b1;
    end else if (ce) begin
      if (set_flags) flags <= flags_in;
      if (enter_sys) begin
        sys_mode <= 1'b1;
        pc_copy  <= 1'b0;
      end else if (leave_sys) begin
        sys_mode <= 1'b0;
        pc_copy  <= 1'b1;
      end
    end
  end

  always_comb begin
    unique case (cond_e'(cond))
      C_AL: cond_true = 1'b1;
      C_EQ: cond_true = flags.z;
      C_NE: cond_true = !flags.z;
      C_CS: cond_true = flags.c;
      C_CC: cond_true = !flags.c;
      C_MI: cond_true = flags.n;
      C_PL: cond_true = !flags.n;
      C_VS: cond_true = flags.v;
      C_VC: cond_true = !flags.v;
      C_HI: cond_true = flags.c && !flags.z;
      C_LS: cond_true = !flags.c || flags.z;
      C_GE: cond_true = flags.n == flags.v;
      C_LT: cond_true = flags.n != flags.v;
      C_GT: cond_true = !flags.z && (flags.n == flags.v);
      C_LE: cond_true = flags.z || (flags.n != flags.v);
      C_NV: cond_true = 1'b0;
    endcase
  end

endmodule
