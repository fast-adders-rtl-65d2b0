// tb_csel_group: self-checking testbench for one carry-select group.
//
// All operand pairs of the default 4-bit group with both values of the
// actual carry in are applied (512 cases), and a 6-bit group is checked on
// all of its 8192 cases. The sum and carry out must equal the integer
// a + b + cin. One input change per time unit; watchdog.
module tb_csel_group;

  int checks   = 0;
  int failures = 0;

  logic [3:0] a, b, s;
  logic       cin, cout;
  logic [5:0] a6, b6, s6;
  logic       cin6, cout6;

  csel_group #(.W(4)) dut  (.a(a),  .b(b),  .cin(cin),  .s(s),  .cout(cout));
  csel_group #(.W(6)) dut6 (.a(a6), .b(b6), .cin(cin6), .s(s6), .cout(cout6));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 8192; v++) begin
      {a6, b6, cin6} = 13'(v);
      {a, b, cin}    = 9'(v);
      #1;
      checks++;
      if ({cout6, s6} !== 7'(a6) + 7'(b6) + 7'(cin6)) begin
        failures++;
        if (failures <= 10) $display("W=6: %0d + %0d + %0d -> %0d", a6, b6, cin6, {cout6, s6});
      end
      if (v < 512) begin
        checks++;
        if ({cout, s} !== 5'(a) + 5'(b) + 5'(cin)) begin
          failures++;
          if (failures <= 10) $display("W=4: %0d + %0d + %0d -> %0d", a, b, cin, {cout, s});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
