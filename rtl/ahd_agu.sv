// ahd_agu: effective-address adder of the AHD-2494.
//
// All memory, I/O and control-flow instructions use one addressing mode,
// base register + signed offset. This unit sign-extends the 11-bit offset
// of the instruction to the word width and adds it to the base register
// value, modulo 2^24. With R0 as base it gives absolute addresses
// -1024..1023, with R15 (the PC copy) PC-relative ones, and with any other
// register indexed ones. Purely combinational.
//
// The addressing mode and the offset width follow the published
// architecture.
module ahd_agu
  import ahd_pkg::*;
#(
  parameter int W    = XLEN,
  parameter int OW   = OFFW
) (
  input  logic [W-1:0]  base,
  input  logic [OW-1:0] offset,
  output logic [W-1:0]  ea
);

  assign ea = base + {{(W-OW){offset[OW-1]}}, offset};

endmodule
