// tb_ahd_control: self-checking test of the AHD-2494 control unit.
//
// Drives random sequences of "memory instruction in execute" and "taken
// transfer in execute" (never both at once), with ce high on every other
// clock as in the processor, and checks against a two-state reference:
// a memory instruction seen in T0 gives exactly one TM cycle next, TM
// freezes the pipeline, and flush is raised only for a transfer in T0.
// Also checks that back-to-back memory instructions each get their TM
// cycle (one instruction per two processor cycles).
module tb_ahd_control;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic ex_mem = 0, ex_redirect = 0, in_tm, advance, flush;
  int checks = 0, failures = 0;
  bit ref_tm = 0;
  int n_tm = 0;

  ahd_control dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      ce = k[0];
      case ($urandom_range(0, 3))
        0: begin ex_mem = 1; ex_redirect = 0; end
        1: begin ex_mem = 0; ex_redirect = 1; end
        default: begin ex_mem = 0; ex_redirect = 0; end
      endcase
      if (k > 2000) begin ex_mem = 1; ex_redirect = 0; end  // back-to-back
      #1;
      chk("in_tm", in_tm, ref_tm);
      chk("advance", advance, !ref_tm);
      chk("flush", flush, !ref_tm && ex_redirect);
      @(posedge clk);
      if (ce) begin
        if (ref_tm) n_tm++;
        ref_tm = !ref_tm && ex_mem;
      end
    end
    checks++;
    if (n_tm < 250) begin
      failures++;
      $display("FAIL only %0d TM cycles", n_tm);
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
