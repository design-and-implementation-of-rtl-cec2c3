// tb_ahd_regfile: self-checking test of the AHD-2494 register file.
//
// Runs random cycles of writes, PC copies and reads against a plain array
// model that applies the same rules: writes land at the end of a cycle
// with ce high, R0 stays zero, R15 takes the PC copy unless the write port
// writes it in the same cycle, and reads show the value from before the
// current cycle's write. Also checks that nothing changes with ce low and
// that reset clears every register.
module tb_ahd_regfile;
  logic        clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic [3:0]  ra_a, ra_b, wa;
  logic [23:0] rd_a, rd_b, wd, pc_copy_val;
  logic        we, pc_copy_en;
  int checks = 0, failures = 0;
  logic [23:0] model [16];

  ahd_regfile dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, logic [23:0] got, logic [23:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %06h expected %06h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; pc_copy_en = 0; pc_copy_val = 0; ra_a = 0; ra_b = 0;
    for (int i = 0; i < 16; i++) model[i] = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int r = 0; r < 16; r++) begin
      ra_a = 4'(r); #1; chk("after reset", rd_a, 24'd0);
    end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      ce          = ($urandom_range(0, 4) != 0);
      we          = $urandom_range(0, 1);
      wa          = 4'($urandom);
      if (k % 7 == 0) wa = 4'd0;
      if (k % 11 == 0) wa = 4'd15;
      wd          = 24'($urandom);
      pc_copy_en  = $urandom_range(0, 1);
      pc_copy_val = 24'($urandom);
      ra_a        = (k % 3 == 0) ? wa : 4'($urandom);
      ra_b        = 4'($urandom);
      #1;
      chk("port A", rd_a, model[ra_a]);
      chk("port B", rd_b, model[ra_b]);
      @(posedge clk);
      if (ce) begin
        if (pc_copy_en) model[15] = pc_copy_val;
        if (we && wa != 0) model[wa] = wd;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10000; i++) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
