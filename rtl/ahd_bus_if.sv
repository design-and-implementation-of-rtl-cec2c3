// ahd_bus_if: multiplexed address/data pin interface of the AHD-2494.
//
// The package has only 32 pins, so addresses and data share 24 pins. Each
// processor cycle is made of two phases of the input clock:
//   phase 1 (ph = 0): the address is driven on ad_out, ale = 1;
//                     io_n tells memory (1) from I/O space (0).
//   phase 2 (ph = 1): a write drives the data on ad_out with wr_n = 0;
//                     a read releases the pins (ad_oe = 0) with rd_n = 0,
//                     and the device drives ad_in, which is sampled on the
//                     rising clock edge that ends phase 2.
// ce marks that edge: the rest of the processor changes state only there.
// One bus transfer, an instruction fetch or a data transfer, takes place
// every processor cycle. There are no wait states.
//
// The pin multiplexing and the two-phase clocking follow the published
// design; the strobe names and polarities, the phase order and the lack of
// wait states are this design's choices. The two phases are made from one
// clock at twice the processor rate, so that all state is on one edge.
module ahd_bus_if
  import ahd_pkg::*;
#(
  parameter int W = XLEN
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         ph,      // 0 = address phase, 1 = data phase
  output logic         ce,      // end of processor cycle on the next edge
  // processor side
  input  logic [W-1:0] addr,
  input  logic [W-1:0] wdata,
  input  logic         write,
  input  logic         io,
  output logic [W-1:0] rdata,
  // pins
  input  logic [W-1:0] ad_in,
  output logic [W-1:0] ad_out,
  output logic         ad_oe,
  output logic         ale,
  output logic         rd_n,
  output logic         wr_n,
  output logic         io_n
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ph <= 1'b0;
    else        ph <= !ph;
  end

  assign ce     = ph;
  assign ale    = !ph;
  assign ad_out = ph ? wdata : addr;
  assign ad_oe  = !ph || write;
  assign rd_n   = !(ph && !write);
  assign wr_n   = !(ph && write);
  assign io_n   = !io;
  assign rdata  = ad_in;

endmodule
