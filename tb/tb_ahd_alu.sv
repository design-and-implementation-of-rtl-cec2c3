// tb_ahd_alu: self-checking test of the AHD-2494 ALU.
//
// Applies random and corner-case operand pairs to all seven operations and
// compares the result, carry and overflow with a reference computed with
// wide integer arithmetic (subtraction as a true difference, carry as
// "no borrow", overflow from the signed result range). The unused opcode
// must give zero.
module tb_ahd_alu;
  import ahd_pkg::*;

  logic        clk = 1'b0;
  logic [23:0] a, b, y;
  logic [2:0]  op;
  logic        c_out, v_out;
  int checks = 0, failures = 0;

  ahd_alu dut (.*);

  always #5 clk = ~clk;

  task automatic ref_model(input logic [23:0] ra, rb, input logic [2:0] rop,
                           output logic [23:0] ry, output logic rc, rv);
    longint sa, sb, s, u;
    sa = longint'($signed(ra)); sb = longint'($signed(rb));
    rc = 0; rv = 0;
    case (rop)
      3'd0: begin u = longint'(ra) + longint'(rb);     s = sa + sb;     end
      3'd1: begin u = longint'(ra) + longint'(rb) + 1; s = sa + sb + 1; end
      3'd2: begin u = longint'(ra) - longint'(rb) - 1; s = sa - sb - 1; end
      3'd3: begin u = longint'(ra) - longint'(rb);     s = sa - sb;     end
      default: begin u = 0; s = 0; end
    endcase
    case (rop)
      3'd0, 3'd1: begin ry = u[23:0]; rc = (u >= (1 << 24)); rv = (s > 8388607 || s < -8388608); end
      3'd2, 3'd3: begin ry = u[23:0]; rc = (u >= 0);         rv = (s > 8388607 || s < -8388608); end
      3'd4: ry = ra & rb;
      3'd5: ry = ra | rb;
      3'd6: ry = ra ^ rb;
      default: ry = '0;
    endcase
  endtask

  task automatic apply(logic [23:0] ta, tb_, logic [2:0] top);
    logic [23:0] ey; logic ec, ev;
    a = ta; b = tb_; op = top;
    #1;
    ref_model(ta, tb_, top, ey, ec, ev);
    checks++;
    if ({y, c_out, v_out} !== {ey, ec, ev}) begin
      failures++;
      $display("FAIL op %0d a %06h b %06h: got %06h c%0b v%0b expected %06h c%0b v%0b",
               top, ta, tb_, y, c_out, v_out, ey, ec, ev);
    end
  endtask

  initial begin
    logic [23:0] corner [6] = '{24'h000000, 24'h000001, 24'h7FFFFF, 24'h800000, 24'hFFFFFF, 24'h123456};
    for (int o = 0; o < 8; o++) begin
      foreach (corner[i]) foreach (corner[j]) apply(corner[i], corner[j], 3'(o));
      for (int k = 0; k < 300; k++) apply(24'($urandom), 24'($urandom), 3'(o));
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
