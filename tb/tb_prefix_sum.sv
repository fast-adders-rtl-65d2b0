// tb_prefix_sum: self-checking testbench for the carry/sum stage.
//
// The testbench builds the prefix pairs (P,G)_i:0 of real operands itself,
// with a serial scan (G_i:0 = G_i | P_i G_i-1:0, P_i:0 = P_i P_i-1:0), and
// feeds them with the partial sums to prefix_sum. The result must be the
// integer a + b + c0. All 8-bit operand pairs with both carry-in values
// are applied. One input change per time unit; watchdog.
module tb_prefix_sum;
  import adder_pkg::*;

  int checks   = 0;
  int failures = 0;

  pg_t  [7:0] pg_pre;
  logic [7:0] psum, s;
  logic       c0, cout;

  prefix_sum #(.N(8)) dut (.pg_pre(pg_pre), .psum(psum), .c0(c0), .s(s), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [7:0] a, b;
    logic       gp, pp;
    for (int v = 0; v < 131072; v++) begin
      {a, b, c0} = 17'(v);
      gp = 1'b0; pp = 1'b1;
      for (int i = 0; i < 8; i++) begin
        gp = (a[i] & b[i]) | ((a[i] | b[i]) & gp);
        pp = pp & (a[i] | b[i]);
        pg_pre[i].g = gp;
        pg_pre[i].p = pp;
      end
      psum = a ^ b;
      #1;
      checks++;
      if ({cout, s} !== 9'(a) + 9'(b) + 9'(c0)) begin
        failures++;
        if (failures <= 10) $display("mismatch: %0d + %0d + %0d -> %0d", a, b, c0, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
