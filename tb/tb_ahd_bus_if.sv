// tb_ahd_bus_if: self-checking test of the AHD-2494 pin interface.
//
// Over many processor cycles with random addresses, data and access kinds,
// checks that the two phases alternate after reset, that phase 1 drives the
// address with ale high and the pins enabled, that phase 2 drives the data
// with wr_n low for a write and releases the pins with rd_n low for a read,
// that io_n follows the access space, that ce is high only in phase 2 and
// that read data from the pins reaches rdata.
module tb_ahd_bus_if;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        ph, ce, write, io, ad_oe, ale, rd_n, wr_n, io_n;
  logic [23:0] addr, wdata, rdata, ad_in, ad_out;
  int checks = 0, failures = 0;

  ahd_bus_if dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, logic [23:0] got, logic [23:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %06h expected %06h", what, got, exp);
    end
  endtask

  initial begin
    addr = 0; wdata = 0; write = 0; io = 0; ad_in = 0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    chk("first phase after reset", ph, 1);  // phase 1 ran from reset release
    @(negedge clk);
    for (int k = 0; k < 500; k++) begin
      addr = 24'($urandom); wdata = 24'($urandom); write = 1'($urandom); io = 1'($urandom);
      ad_in = 24'($urandom);
      #1;
      // phase 1
      chk("phase 1: ph", ph, 0);
      chk("phase 1: ce", ce, 0);
      chk("phase 1: ale", ale, 1);
      chk("phase 1: ad_out", ad_out, addr);
      chk("phase 1: ad_oe", ad_oe, 1);
      chk("phase 1: strobes idle", {rd_n, wr_n}, 2'b11);
      chk("phase 1: io_n", io_n, !io);
      @(negedge clk);
      #1;
      chk("phase 2: ph", ph, 1);
      chk("phase 2: ce", ce, 1);
      chk("phase 2: ale", ale, 0);
      chk("phase 2: rd_n", rd_n, write);
      chk("phase 2: wr_n", wr_n, !write);
      chk("phase 2: ad_oe", ad_oe, write);
      if (write) chk("phase 2: write data", ad_out, wdata);
      else       chk("phase 2: read data", rdata, ad_in);
      chk("phase 2: io_n", io_n, !io);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
