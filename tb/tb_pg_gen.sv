// tb_pg_gen: self-checking testbench for the bit-level P/G/Psum generator.
//
// All 65536 pairs of 8-bit operands are applied to the default instance.
// For each bit the outputs are compared with the half-adder view of that
// bit: G_i is the half-adder carry, Psum_i its sum, and P_i is set when at
// least one operand bit is set. A 3-bit instance checks the width
// parameter on its 64 cases. One input change per time unit; watchdog.
module tb_pg_gen;
  import adder_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic [7:0] a, b, psum;
  pg_t  [7:0] pg;
  logic [2:0] a3, b3, psum3;
  pg_t  [2:0] pg3;

  pg_gen #(.N(8)) dut  (.a(a),  .b(b),  .pg(pg),  .psum(psum));
  pg_gen #(.N(3)) dut3 (.a(a3), .b(b3), .pg(pg3), .psum(psum3));

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      a3 = a[2:0]; b3 = b[2:0];
      #1;
      for (int i = 0; i < 8; i++) begin
        int n;
        n = int'(a[i]) + int'(b[i]);   // 0, 1 or 2
        checks++;
        if (pg[i].g !== (n == 2) || psum[i] !== (n == 1) || pg[i].p !== (n != 0)) begin
          failures++;
          if (failures <= 10) $display("bit %0d wrong for a=%h b=%h", i, a, b);
        end
      end
      if (v < 64) begin
        for (int i = 0; i < 3; i++) begin
          int n;
          n = int'(a3[i]) + int'(b3[i]);
          checks++;
          if (pg3[i].g !== (n == 2) || psum3[i] !== (n == 1) || pg3[i].p !== (n != 0))
            failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
