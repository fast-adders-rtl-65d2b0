// tb_han_carlson_adder: self-checking testbench for han_carlson_adder (8-bit Han-Carlson).
//
// The 8-bit default instance is checked exhaustively: all 256 x 256
// operand pairs with both carry-in values, 131072 additions, each compared
// with a + b + c0 computed in the testbench as a 9-bit integer sum.
// Two wider instances (N = 16 and N = 32) exercise the width generator
// with random operands plus all-ones / alternating corner patterns.
// Inputs change every time unit; the adder is combinational, so outputs
// are sampled one unit later. A watchdog ends the run with a failure if
// the stimulus has not finished in time. Prints one TB_RESULT line.
module tb_han_carlson_adder;

  int checks   = 0;
  int failures = 0;

  logic [7:0] a, b, s;
  logic       c0, cout;

  han_carlson_adder #(.N(8)) dut (.a(a), .b(b), .c0(c0), .s(s), .cout(cout));

  logic [15:0] a16, b16, s16;
  logic        c16, co16;
  logic [31:0] a32, b32, s32;
  logic        c32, co32;

  han_carlson_adder #(.N(16)) dut16 (.a(a16), .b(b16), .c0(c16), .s(s16), .cout(co16));
  han_carlson_adder #(.N(32)) dut32 (.a(a32), .b(b32), .c0(c32), .s(s32), .cout(co32));

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
    for (int n = 0; n < 20000; n++) begin
      logic [16:0] e16;
      logic [32:0] e32;
      case (n)
        0: begin a16 = '1; b16 = '0; c16 = 1; a32 = '1; b32 = '0; c32 = 1; end
        1: begin a16 = '1; b16 = '1; c16 = 1; a32 = '1; b32 = '1; c32 = 1; end
        2: begin a16 = 16'h5555; b16 = 16'haaaa; c16 = 1;
                 a32 = 32'h5555_5555; b32 = 32'haaaa_aaaa; c32 = 1; end
        3: begin a16 = 16'h8000; b16 = 16'h8000; c16 = 0;
                 a32 = 32'h8000_0000; b32 = 32'h8000_0000; c32 = 0; end
        default: begin
          a16 = 16'($urandom); b16 = 16'($urandom); c16 = 1'($urandom);
          a32 = $urandom; b32 = $urandom; c32 = 1'($urandom);
        end
      endcase
      e16 = 17'(a16) + 17'(b16) + 17'(c16);
      e32 = 33'(a32) + 33'(b32) + 33'(c32);
      #1;
      checks += 2;
      if ({co16, s16} !== e16) begin
        failures++;
        if (failures <= 10) $display("N=16 mismatch: %h + %h + %b", a16, b16, c16);
      end
      if ({co32, s32} !== e32) begin
        failures++;
        if (failures <= 10) $display("N=32 mismatch: %h + %h + %b", a32, b32, c32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
