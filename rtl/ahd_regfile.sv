// ahd_regfile: the 16 x 24-bit register file of the AHD-2494.
//
// Two asynchronous read ports (A and B) and one write port, written on the
// rising clock edge when ce (end of a processor cycle) and we are high.
// R0 always reads as zero and any write to it is dropped. R15 has a second
// load path: while pc_copy_en is high it takes pc_copy_val at the end of the
// cycle, which lets programs use R15 as a PC-relative base. A write through
// the write port to R15 in the same cycle wins over the copy.
//
// Reads return the value held at the start of the cycle: a register written
// in this cycle is not passed through to the read ports (the pipeline has
// no forwarding). All registers reset to zero.
//
// The port count, the zero register and the R15 PC copy follow the published
// architecture; the reset value and the write-port priority on R15 are this
// design's choices.
module ahd_regfile
  import ahd_pkg::*;
#(
  parameter int W = XLEN,
  parameter int N = NREG
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ce,
  input  logic [$clog2(N)-1:0] ra_a,
  output logic [W-1:0]         rd_a,
  input  logic [$clog2(N)-1:0] ra_b,
  output logic [W-1:0]         rd_b,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] wa,
  input  logic [W-1:0]         wd,
  input  logic                 pc_copy_en,
  input  logic [W-1:0]         pc_copy_val
);

  logic [W-1:0] regs [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (ce) begin
      if (pc_copy_en) regs[N-1] <= pc_copy_val;
      if (we && wa != '0) regs[wa] <= wd;
    end
  end

  assign rd_a = (ra_a == '0) ? '0 : regs[ra_a];
  assign rd_b = (ra_b == '0) ? '0 : regs[ra_b];

endmodule
