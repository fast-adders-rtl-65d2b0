// tb_cla_adder16: self-checking testbench for the 16-bit look-ahead adder.
//
// Applies corner cases (a carry from C0 that must cross all 16 bits, a
// carry generated in every group, carries generated in one group and
// propagated through the groups above) and 200000 random operand pairs.
// Each result must equal the 17-bit integer a + b + c0; the block
// propagate must be set exactly when every bit has a or b set, and the
// block generate must equal the carry out of a + b with C0 = 0. One input
// change per time unit; watchdog.
module tb_cla_adder16;

  int checks   = 0;
  int failures = 0;

  logic [15:0] a, b, s;
  logic        c0, cout, blk_p, blk_g;

  cla_adder16 dut (.a(a), .b(b), .c0(c0), .s(s), .cout(cout), .blk_p(blk_p), .blk_g(blk_g));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [15:0] x, logic [15:0] y, logic ci);
    logic [16:0] e, e0;
    a = x; b = y; c0 = ci;
    e  = 17'(x) + 17'(y) + 17'(ci);
    e0 = 17'(x) + 17'(y);
    #1;
    checks += 3;
    if ({cout, s} !== e) begin
      failures++;
      if (failures <= 10) $display("sum wrong: %h + %h + %b = %h, expected %h", x, y, ci, {cout, s}, e);
    end
    if (blk_p !== (&(x | y))) begin
      failures++;
      if (failures <= 10) $display("block propagate wrong for %h, %h", x, y);
    end
    if (blk_g !== e0[16]) begin
      failures++;
      if (failures <= 10) $display("block generate wrong for %h, %h", x, y);
    end
  endtask

  initial begin : stimulus
    check_one(16'hffff, 16'h0000, 1'b1);
    check_one(16'h0000, 16'hffff, 1'b1);
    check_one(16'hffff, 16'hffff, 1'b0);
    check_one(16'h8888, 16'h8888, 1'b0);
    for (int q = 0; q < 4; q++)
      for (int h = q; h < 4; h++) begin
        // generate in bit 4q+3, propagate through bits above up to group h
        logic [15:0] x;
        x = 16'hffff >> (15 - (4*h + 3));
        check_one(x, 16'(1) << (4*q + 3), 1'b0);
        check_one(x, 16'(1) << (4*q), 1'b1);
      end
    for (int n = 0; n < 200000; n++)
      check_one(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
