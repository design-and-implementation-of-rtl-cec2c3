// tb_ahd_psw: self-checking test of the AHD-2494 condition code register.
//
// Checks the reset state (system mode, PC copy on, flags clear), that flags
// load only with set_flags and ce, that enter_sys / leave_sys switch the
// mode and PC-copy bits, and that every one of the 16 condition codes gives
// the expected answer for every one of the 16 flag combinations, using a
// truth table written out from the condition definitions.
module tb_ahd_psw;
  import ahd_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic       set_flags = 0, enter_sys = 0, leave_sys = 0, cond_true, sys_mode, pc_copy;
  logic [3:0] cond = 0;
  flags_t     flags_in = '0, flags;
  int checks = 0, failures = 0;

  ahd_psw dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  function automatic logic expect_cond(int cc, logic c, z, n, v);
    case (cc)
      0: return 1;          1: return z;          2: return !z;
      3: return c;          4: return !c;         5: return n;
      6: return !n;         7: return v;          8: return !v;
      9: return c & !z;     10: return !c | z;    11: return n == v;
      12: return n != v;    13: return !z & (n == v);
      14: return z | (n != v);
      default: return 0;
    endcase
  endfunction

  task automatic step(logic sf, flags_t fi, logic en, logic lv, logic cen);
    @(negedge clk);
    set_flags = sf; flags_in = fi; enter_sys = en; leave_sys = lv; ce = cen;
    @(negedge clk);
    set_flags = 0; enter_sys = 0; leave_sys = 0; ce = 0;
  endtask

  initial begin
    #12 rst_n = 1'b1;
    chk("reset sys_mode", sys_mode, 1);
    chk("reset pc_copy", pc_copy, 1);
    chk("reset flags", |flags, 0);
    step(0, '0, 0, 1, 1);
    chk("leave: user", sys_mode, 0);
    chk("leave: copy on", pc_copy, 1);
    step(0, '0, 1, 0, 0);
    chk("no ce: still user", sys_mode, 0);
    step(0, '0, 1, 0, 1);
    chk("enter: system", sys_mode, 1);
    chk("enter: copy off", pc_copy, 0);
    step(1, 4'b1111, 0, 0, 0);
    chk("no ce: flags kept", |flags, 0);
    step(0, 4'b1111, 0, 0, 1);
    chk("no set_flags: flags kept", |flags, 0);
    for (int f = 0; f < 16; f++) begin
      step(1, flags_t'(f), 0, 0, 1);
      chk("flags loaded", flags == flags_t'(f), 1);
      for (int cc = 0; cc < 16; cc++) begin
        cond = 4'(cc);
        #1;
        chk($sformatf("cond %0d flags %04b", cc, f), cond_true,
            expect_cond(cc, f[3], f[2], f[1], f[0]));
      end
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
