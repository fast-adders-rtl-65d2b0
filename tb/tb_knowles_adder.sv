// tb_knowles_adder: self-checking testbench for knowles_adder (8-bit Knowles).
//
// The 8-bit default instance is checked exhaustively: all 256 x 256
// operand pairs with both carry-in values, 131072 additions, each compared
// with a + b + c0 computed in the testbench as a 9-bit integer sum.
// Inputs change every time unit; the adder is combinational, so outputs
// are sampled one unit later. A watchdog ends the run with a failure if
// the stimulus has not finished in time. Prints one TB_RESULT line.
module tb_knowles_adder;

  int checks   = 0;
  int failures = 0;

  logic [7:0] a, b, s;
  logic       c0, cout;

  knowles_adder dut (.a(a), .b(b), .c0(c0), .s(s), .cout(cout));

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [8:0] expect8;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int k = 0; k < 2; k++) begin
          a = 8'(i); b = 8'(j); c0 = 1'(k);
          expect8 = 9'(i) + 9'(j) + 9'(k);
          #1;
          checks++;
          if ({cout, s} !== expect8) begin
            failures++;
            if (failures <= 10)
              $display("mismatch: %0d + %0d + %0d = %0d, expected %0d",
                       i, j, k, {cout, s}, expect8);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
