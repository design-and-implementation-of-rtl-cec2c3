// ahd_pkg: types, constants and instruction encoders shared by the AHD-2494
// processor and its testbenches.
//
// The AHD-2494 is a 24-bit load/store RISC with 16 registers, 24-bit fixed
// length instructions and a 3-stage pipeline. Instruction word layout:
//
//   bits   ALU format          control-flow / system format
//   23:22  00                  10 (control flow) or 11 (privileged system)
//   21:19  opcode              opcode
//   18:15  Rdest               Rs/d (LOAD/STORE/IN/OUT) or condition
//   14:11  Rop1                Rbase
//   10:7   Rop2                signed offset, 11 bits (10:0)
//   6      c (set flags)
//   5:0    shift
//
// Type 01 (floating point) belongs to a larger variant of the architecture
// and executes as a NOP here. The field positions, the instruction set and
// the type codes follow the published architecture; the opcode numbers, the
// condition codes, the shift-field bit meanings and the trap vectors are
// this design's own choices, given below.
package ahd_pkg;

  localparam int XLEN   = 24;  // word, register, bus and address width
  localparam int NREG   = 16;  // registers R0..R15
  localparam int RAW    = 4;   // register address width
  localparam int OFFW   = 11;  // signed offset width
  localparam int SYSREG = 8;   // R8..R15 are the operating-system registers

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RAW-1:0]  reg_t;

  // Register numbers with a hardware role
  localparam reg_t R_ZERO = 4'd0;   // reads 0, writes discarded
  localparam reg_t R_DEST = 4'd13;  // receives the target of CALL/RET/SYS
  localparam reg_t R_PC   = 4'd15;  // copy of the PC while copying is on

  // Trap vectors (word addresses) of the system code
  localparam word_t RESET_VEC = 24'h000000;
  localparam word_t CALL_VEC  = 24'h000010;
  localparam word_t RET_VEC   = 24'h000020;
  localparam word_t SYS_VEC   = 24'h000030;

  // Instruction type, bits 23:22
  typedef enum logic [1:0] {
    T_ALU = 2'b00, T_FPU = 2'b01, T_CF = 2'b10, T_SYS = 2'b11
  } itype_e;

  // ALU opcodes, bits 21:19 with type 00 (111 is unused and acts as NOP)
  typedef enum logic [2:0] {
    OP_ADD = 3'd0, OP_ADDP = 3'd1, OP_SUBM = 3'd2, OP_SUB = 3'd3,
    OP_AND = 3'd4, OP_OR   = 3'd5, OP_XOR  = 3'd6
  } alu_op_e;

  // Control-flow opcodes, bits 21:19 with type 10
  localparam logic [2:0] CF_LOAD = 3'd0, CF_STORE = 3'd1, CF_JUMP = 3'd2,
                         CF_CALL = 3'd3, CF_RET   = 3'd4, CF_SYS  = 3'd5;
  // Privileged opcodes, bits 21:19 with type 11
  localparam logic [2:0] SY_IN = 3'd0, SY_OUT = 3'd1, SY_SRET = 3'd2;

  // Branch conditions, bits 18:15 of a conditional instruction
  typedef enum logic [3:0] {
    C_AL = 4'd0,  C_EQ = 4'd1,  C_NE = 4'd2,  C_CS = 4'd3,
    C_CC = 4'd4,  C_MI = 4'd5,  C_PL = 4'd6,  C_VS = 4'd7,
    C_VC = 4'd8,  C_HI = 4'd9,  C_LS = 4'd10, C_GE = 4'd11,
    C_LT = 4'd12, C_GT = 4'd13, C_LE = 4'd14, C_NV = 4'd15
  } cond_e;

  // Shift field, bits 5:0: [5] 1 = right, 0 = left; [4] 1 = rotate,
  // 0 = logical shift; [3:0] amount 0..15

  typedef struct packed {
    logic c;  // carry (no borrow for subtraction)
    logic z;  // zero
    logic n;  // negative
    logic v;  // two's complement overflow
  } flags_t;

  // Decoded instruction class
  typedef enum logic [3:0] {
    K_NOP, K_ALU, K_LOAD, K_STORE, K_JUMP, K_CALL, K_RET, K_SYS,
    K_IN, K_OUT, K_SRET
  } kind_e;

  typedef struct packed {
    kind_e              kind;
    alu_op_e            alu_op;
    reg_t               ra;        // read port A: Rop1 / Rbase
    reg_t               rb;        // read port B: Rop2 / Rsource
    reg_t               rd;        // destination
    logic               we;        // writes rd (after protection check)
    logic               set_flags;
    logic [5:0]         shift;
    cond_e              cond;
    logic [OFFW-1:0]    offset;
  } dec_t;

  // Instruction encoders (used by testbenches as a small assembler)
  function automatic word_t enc_alu(alu_op_e op, reg_t rd, reg_t r1, reg_t r2,
                                    logic c, logic [5:0] sh);
    return {T_ALU, op, rd, r1, r2, c, sh};
  endfunction

  function automatic word_t enc_cf(logic [1:0] t, logic [2:0] op, logic [3:0] rsd,
                                   reg_t rbase, logic [OFFW-1:0] off);
    return {t, op, rsd, rbase, off};
  endfunction

endpackage
