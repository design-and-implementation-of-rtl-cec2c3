// tb_ahd_agu: self-checking test of the AHD-2494 address adder.
//
// Checks base + signed 11-bit offset, modulo 2^24, against integer
// arithmetic for corner offsets (0, +1, -1, +1023, -1024) and random
// bases and offsets, including wrap-around at both ends of the space.
module tb_ahd_agu;
  logic        clk = 1'b0;
  logic [23:0] base, ea;
  logic [10:0] offset;
  int checks = 0, failures = 0;

  ahd_agu dut (.*);

  always #5 clk = ~clk;

  task automatic apply(logic [23:0] b, int off);
    logic [23:0] exp;
    base = b; offset = 11'(off);
    #1;
    exp = 24'((longint'(b) + longint'(off)) & 64'hFFFFFF);
    checks++;
    if (ea !== exp) begin
      failures++;
      $display("FAIL base %06h off %0d: got %06h expected %06h", b, off, ea, exp);
    end
  endtask

  initial begin
    int offs [5] = '{0, 1, -1, 1023, -1024};
    logic [23:0] bases [4] = '{24'h000000, 24'hFFFFFF, 24'h000400, 24'h7FFFFF};
    foreach (bases[i]) foreach (offs[j]) apply(bases[i], offs[j]);
    for (int k = 0; k < 500; k++) apply(24'($urandom), int'($urandom_range(0, 2047)) - 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100000; i++) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
