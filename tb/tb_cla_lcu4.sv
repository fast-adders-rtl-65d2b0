// tb_cla_lcu4: self-checking testbench for the 4-way look-ahead carry unit.
//
// All 2^9 combinations of four (P,G) pairs and the carry in are applied.
// The reference ripples the carry one position at a time,
// C_i+1 = G_i + P_i C_i, which the unit must match in all four carries;
// the group generate must equal the rippled carry out for carry in 0, and
// the group propagate the AND of the four P. One input change per time
// unit; watchdog.
module tb_cla_lcu4;
  import adder_pkg::*;

  int checks   = 0;
  int failures = 0;

  pg_t  [3:0] pg;
  logic       cin;
  logic [3:0] c;
  pg_t        grp;

  cla_lcu4 dut (.pg(pg), .cin(cin), .c(c), .grp(grp));

  function automatic logic [3:0] ripple(pg_t [3:0] x, logic ci);
    logic [3:0] r;
    logic cy;
    cy = ci;
    for (int i = 0; i < 4; i++) begin
      cy = x[i].g | (x[i].p & cy);
      r[i] = cy;
    end
    return r;
  endfunction

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [3:0] exp_c, c_from0;
    for (int v = 0; v < 512; v++) begin
      {pg, cin} = 9'(v);
      exp_c   = ripple(pg, cin);
      c_from0 = ripple(pg, 1'b0);
      #1;
      checks += 3;
      if (c !== exp_c) begin
        failures++;
        $display("carries wrong for pg=%b cin=%b: %b, expected %b", pg, cin, c, exp_c);
      end
      if (grp.g !== c_from0[3]) begin
        failures++;
        $display("group generate wrong for pg=%b", pg);
      end
      if (grp.p !== (pg[0].p & pg[1].p & pg[2].p & pg[3].p)) begin
        failures++;
        $display("group propagate wrong for pg=%b", pg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
