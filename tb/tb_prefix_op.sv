// tb_prefix_op: self-checking testbench for the prefix operator "o".
//
// Applies all 16 combinations of (P_hi, G_hi, P_lo, G_lo) and compares the
// result with the carry behaviour it stands for: the combined span
// propagates only if both halves propagate, and generates if the upper
// half generates or the upper half propagates a carry generated below.
// It then checks associativity on all 64 triples of (P,G) pairs, by
// chaining three instances both ways. One input change per time unit;
// watchdog and TB_RESULT line as in the other testbenches.
module tb_prefix_op;
  import adder_pkg::*;

  int checks   = 0;
  int failures = 0;

  pg_t hi, lo, res;
  pg_t x, y, z, xy, xy_z, yz, x_yz;

  prefix_op dut (.hi(hi), .lo(lo), .res(res));

  // (x o y) o z and x o (y o z)
  prefix_op u_xy  (.hi(x),  .lo(y),  .res(xy));
  prefix_op u_xyz (.hi(xy), .lo(z),  .res(xy_z));
  prefix_op u_yz  (.hi(y),  .lo(z),  .res(yz));
  prefix_op u_xyz2(.hi(x),  .lo(yz), .res(x_yz));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 16; v++) begin
      logic exp_p, exp_g;
      {hi.p, hi.g, lo.p, lo.g} = 4'(v);
      // a carry leaves the span if it is made in the upper half, or made in
      // the lower half and passed by the upper half
      exp_g = hi.g ? 1'b1 : (hi.p ? lo.g : 1'b0);
      exp_p = (hi.p == 1'b1) && (lo.p == 1'b1);
      #1;
      checks++;
      if (res.p !== exp_p || res.g !== exp_g) begin
        failures++;
        $display("mismatch for hi=%b lo=%b: got %b", {hi.p, hi.g}, {lo.p, lo.g}, res);
      end
    end
    for (int v = 0; v < 64; v++) begin
      {x, y, z} = 6'(v);
      #1;
      checks++;
      if (xy_z !== x_yz) begin
        failures++;
        $display("not associative for %b %b %b", x, y, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
