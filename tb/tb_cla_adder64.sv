// tb_cla_adder64: self-checking testbench for the 64-bit look-ahead adder.
//
// Applies corner cases (a carry from C0 that must cross all 64 bits, a
// carry generated at the top of each 16-bit block and propagated through
// every block above it) and 100000 random operand pairs. Each result must
// equal the 65-bit integer a + b + c0; the section propagate must be set
// exactly when every bit has a or b set, and the section generate must
// equal the carry out of a + b with C0 = 0. One input change per time
// unit; watchdog.
module tb_cla_adder64;

  int checks   = 0;
  int failures = 0;

  logic [63:0] a, b, s;
  logic        c0, cout, sec_p, sec_g;

  cla_adder64 dut (.a(a), .b(b), .c0(c0), .s(s), .cout(cout), .sec_p(sec_p), .sec_g(sec_g));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [63:0] x, logic [63:0] y, logic ci);
    logic [64:0] e, e0;
    a = x; b = y; c0 = ci;
    e  = 65'(x) + 65'(y) + 65'(ci);
    e0 = 65'(x) + 65'(y);
    #1;
    checks += 3;
    if ({cout, s} !== e) begin
      failures++;
      if (failures <= 10) $display("sum wrong: %h + %h + %b = %h, expected %h", x, y, ci, {cout, s}, e);
    end
    if (sec_p !== (&(x | y))) begin
      failures++;
      if (failures <= 10) $display("section propagate wrong for %h, %h", x, y);
    end
    if (sec_g !== e0[64]) begin
      failures++;
      if (failures <= 10) $display("section generate wrong for %h, %h", x, y);
    end
  endtask

  initial begin : stimulus
    check_one('1, '0, 1'b1);
    check_one('1, '1, 1'b0);
    for (int q = 0; q < 4; q++)
      for (int h = q; h < 4; h++) begin
        logic [63:0] x;
        x = 64'hffff_ffff_ffff_ffff >> (63 - (16*h + 15));
        check_one(x, 64'(1) << (16*q + 15), 1'b0);
        check_one(x, 64'(1) << (16*q), 1'b1);
      end
    for (int n = 0; n < 100000; n++)
      check_one({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
