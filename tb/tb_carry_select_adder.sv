// tb_carry_select_adder: self-checking testbench for the carry-select adder.
//
// The default 16-bit, 4-bit-group instance gets corner cases (a carry from
// c0 that has to select through every group, a carry generated in the
// lowest group that ripples through all group multiplexers) and 200000
// random operand pairs. Sum and carry out must equal the integer
// a + b + c0, and each group carry on gc must equal the carry that the
// integer addition of the bits below that group produces. An 8-bit
// instance with 2-bit groups is checked exhaustively. One input change per
// time unit; watchdog.
module tb_carry_select_adder;

  int checks   = 0;
  int failures = 0;

  logic [15:0] a, b, s;
  logic        c0, cout;
  logic [3:0]  gc;
  logic [7:0]  a8, b8, s8;
  logic        c8, cout8;
  logic [3:0]  gc8;

  carry_select_adder #(.N(16), .W(4)) dut (.a(a), .b(b), .c0(c0), .s(s), .cout(cout), .gc(gc));
  carry_select_adder #(.N(8),  .W(2)) dut8 (.a(a8), .b(b8), .c0(c8), .s(s8), .cout(cout8), .gc(gc8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [15:0] x, logic [15:0] y, logic ci);
    logic [16:0] e;
    logic [3:0]  egc;
    a = x; b = y; c0 = ci;
    e = 17'(x) + 17'(y) + 17'(ci);
    for (int q = 0; q < 4; q++) begin
      logic [16:0] lowsum;
      lowsum = 17'(x & ((32'(1) << (4*q)) - 32'(1))) + 17'(y & ((32'(1) << (4*q)) - 32'(1))) + 17'(ci);
      egc[q] = lowsum[4*q];
    end
    #1;
    checks += 2;
    if ({cout, s} !== e) begin
      failures++;
      if (failures <= 10) $display("sum wrong: %h + %h + %b = %h, expected %h", x, y, ci, {cout, s}, e);
    end
    if (gc !== egc) begin
      failures++;
      if (failures <= 10) $display("group carries wrong: %h + %h + %b: %b, expected %b", x, y, ci, gc, egc);
    end
  endtask

  initial begin : stimulus
    check_one(16'hffff, 16'h0000, 1'b1);
    check_one(16'h0000, 16'hffff, 1'b1);
    check_one(16'hfff8, 16'h0008, 1'b0);
    check_one(16'hffff, 16'hffff, 1'b1);
    for (int n = 0; n < 200000; n++)
      check_one(16'($urandom), 16'($urandom), 1'($urandom));
    for (int v = 0; v < 131072; v++) begin
      {a8, b8, c8} = 17'(v);
      #1;
      checks++;
      if ({cout8, s8} !== 9'(a8) + 9'(b8) + 9'(c8)) begin
        failures++;
        if (failures <= 10) $display("N=8: %0d + %0d + %0d -> %0d", a8, b8, c8, {cout8, s8});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
