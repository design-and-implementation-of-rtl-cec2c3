// tb_ahd_shifter: self-checking test of the AHD-2494 barrel shifter.
//
// For random words and every one of the 64 shift-field values, compares the
// output with a reference that moves the bits one place at a time: a left
// or right step, filling with zero (logical) or with the bit that falls out
// (rotate), repeated sh[3:0] times.
module tb_ahd_shifter;
  logic        clk = 1'b0;
  logic [23:0] din, dout;
  logic [5:0]  sh;
  int checks = 0, failures = 0;

  ahd_shifter dut (.*);

  always #5 clk = ~clk;

  function automatic logic [23:0] ref_shift(logic [23:0] v, logic [5:0] s);
    for (int i = 0; i < int'(s[3:0]); i++) begin
      if (!s[5]) v = {v[22:0], s[4] ? v[23] : 1'b0};
      else       v = {s[4] ? v[0] : 1'b0, v[23:1]};
    end
    return v;
  endfunction

  initial begin
    for (int k = 0; k < 60; k++) begin
      logic [23:0] v;
      v = (k == 0) ? 24'h800001 : 24'($urandom);
      for (int s = 0; s < 64; s++) begin
        din = v; sh = 6'(s);
        #1;
        checks++;
        if (dout !== ref_shift(v, 6'(s))) begin
          failures++;
          $display("FAIL din %06h sh %02h: got %06h expected %06h", v, s, dout, ref_shift(v, 6'(s)));
        end
      end
    end
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
