// ahd_mem_model: behavioural model of the memory and I/O devices on the
// AHD-2494 multiplexed bus, for simulation only.
//
// It latches the address at the end of the address phase (ale = 1), then
// in the data phase returns mem[addr] (or io_rd[addr] when io_n = 0) on
// ad_in while rd_n = 0, and stores ad_out into mem (or io_wr) at the end of
// the data phase when wr_n = 0. Memory is DEPTH words, addressed modulo
// DEPTH; the I/O space has 256 ports each way. Writes to I/O ports are
// also counted per port (io_wr_cnt). Testbenches fill mem and io_rd
// directly by hierarchical reference.
module ahd_mem_model #(
  parameter int DEPTH = 4096
) (
  input  logic        clk,
  input  logic [23:0] ad_out,
  input  logic        ad_oe,
  input  logic        ale,
  input  logic        rd_n,
  input  logic        wr_n,
  input  logic        io_n,
  output logic [23:0] ad_in
);

  logic [23:0] mem   [DEPTH];
  logic [23:0] io_rd [256];
  logic [23:0] io_wr [256];
  int          io_wr_cnt [256];
  logic [23:0] alat;
  int unsigned mem_reads, mem_writes, io_reads, io_writes;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    for (int i = 0; i < 256; i++) begin
      io_rd[i] = '0; io_wr[i] = '0; io_wr_cnt[i] = 0;
    end
    alat = '0;
    mem_reads = 0; mem_writes = 0; io_reads = 0; io_writes = 0;
  end

  always @(posedge clk) begin
    if (ale) alat <= ad_out;
    if (!wr_n) begin
      if (!ad_oe) $error("write with pins released");
      if (io_n) begin
        mem[alat % DEPTH] <= ad_out;
        mem_writes++;
      end else begin
        io_wr[alat[7:0]] <= ad_out;
        io_wr_cnt[alat[7:0]]++;
        io_writes++;
      end
    end
    if (!rd_n) begin
      if (io_n) mem_reads++;
      else      io_reads++;
    end
  end

  always_comb begin
    if (!rd_n) ad_in = io_n ? mem[alat % DEPTH] : io_rd[alat[7:0]];
    else       ad_in = 24'h5A5A5A;  // bus idle: pattern, never sampled
  end

endmodule
