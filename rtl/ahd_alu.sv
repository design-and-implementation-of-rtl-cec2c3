// ahd_alu: the integer ALU of the AHD-2494.
//
// Seven operations on two 24-bit operands A (Rop1) and B (Rop2):
//   ADD  A + B        ADDP A + B + 1
//   SUBM A - B - 1    SUB  A - B
//   AND, OR, XOR      bit by bit
// The four arithmetic operations share one adder, A + (B or ~B) + carry-in:
// SUB is A + ~B + 1 and SUBM is A + ~B + 0. The carry output is the adder's
// carry, so after a subtraction C = 1 means "no borrow". V is two's
// complement overflow. Logic operations give C = V = 0. The unused opcode
// (111) gives zero. Purely combinational.
//
// The operation list follows the published instruction set; the shared
// adder and the carry convention are this design's choices.
module ahd_alu
  import ahd_pkg::*;
#(
  parameter int W = XLEN
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [2:0]   op,
  output logic [W-1:0] y,
  output logic         c_out,
  output logic         v_out
);

  logic         inv_b, cin;
  logic [W-1:0] bb;
  logic [W:0]   sum;

  always_comb begin
    inv_b = (op == OP_SUB) || (op == OP_SUBM);
    cin   = (op == OP_ADDP) || (op == OP_SUB);
    bb    = inv_b ? ~b : b;
    sum   = {1'b0, a} + {1'b0, bb} + {{W{1'b0}}, cin};
    y     = '0;
    c_out = 1'b0;
    v_out = 1'b0;
    unique case (op)
      OP_ADD, OP_ADDP, OP_SUBM, OP_SUB: begin
        y     = sum[W-1:0];
        c_out = sum[W];
        v_out = (a[W-1] == bb[W-1]) && (sum[W-1] != a[W-1]);
      end
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      default: y = '0;
    endcase
  end

endmodule
