// ahd_shifter: the barrel shifter behind the ALU of the AHD-2494.
//
// Every ALU result passes through it: Rdest = shift(A op B). The 6-bit
// shift field of the instruction selects
//   sh[5]   direction: 0 = left, 1 = right
//   sh[4]   kind:      0 = logical shift (zeros enter), 1 = rotate
//   sh[3:0] amount:    0..15 places
// A field of zero passes the value unchanged. It is built as a log-depth
// barrel: four stages of 1, 2, 4 and 8 places. Purely combinational.
//
// That the ALU output feeds a barrel shifter, and the split of the field
// into a direction bit, a shift/rotate bit and a 4-bit amount, follow the
// published architecture; which value of each bit means what is this
// design's choice.
module ahd_shifter
  import ahd_pkg::*;
#(
  parameter int W = XLEN
) (
  input  logic [W-1:0] din,
  input  logic [5:0]   sh,
  output logic [W-1:0] dout
);

  logic [W-1:0] stage [5];

  always_comb begin
    stage[0] = din;
    for (int s = 0; s < 4; s++) begin
      logic [W-1:0] cur, nxt;
      int           k;
      cur = stage[s];
      k   = 1 << s;
      if (!sh[s]) nxt = cur;
      else if (!sh[5]) nxt = (cur << k) | (sh[4] ? (cur >> (W - k)) : '0);
      else             nxt = (cur >> k) | (sh[4] ? (cur << (W - k)) : '0);
      stage[s+1] = nxt;
    end
    dout = stage[4];
  end

endmodule
