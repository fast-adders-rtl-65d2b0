// tb_fast_adders_top: end-to-end testbench for all adders of the top level.
//
// The four 8-bit parallel-prefix adders (Kogge-Stone, Ladner-Fischer,
// Knowles, Han-Carlson) get the same operands and are run through all
// 131072 cases of a + b + c0; they must each match the integer sum. The
// 16-bit and 64-bit carry look-ahead and the carry-select adders get directed and random
// 16-bit operands and must also match the integer sum, with the CLA block
// propagate/generate and the carry-select group carries checked too.
//
// The testbench also counts how often each carry mechanism of the
// designs was exercised, and counts a failure for any that never was:
//   ripple_all   a carry from c0 passing through all 8 bits of the prefix
//                adders (every bit propagates, none generates)
//   gen_low      a carry generated in bit 0 reaching the carry out
//   cla_blk_prop C16 produced through P_15:0 (block propagate, no generate)
//   cla_blk_gen  C16 produced by G_15:0
//   cla_grp_cross a carry generated in one 4-bit group and propagated
//                through a whole higher group by the look-ahead carries
//   cla64_sec_prop  C64 produced from C0 through all 64 bits (P_63:0)
//   cla64_blk_cross a carry generated in one 16-bit block and carried
//                through the whole next block by the section unit
//   csel_pick1 / csel_pick0  a carry-select group whose actual carry in
//                selected the "carry in = 1" / "= 0" adder
//   csel_chain   a carry selected through every group, c0 to carry out
// Every input change is followed by one time unit for the combinational
// outputs to settle. Runs with the top's parameters at their defaults.
module tb_fast_adders_top;

  int checks   = 0;
  int failures = 0;

  logic [7:0]  ks_a, ks_b, ks_s, lf_a, lf_b, lf_s, kn_a, kn_b, kn_s, hc_a, hc_b, hc_s;
  logic        ks_c0, ks_cout, lf_c0, lf_cout, kn_c0, kn_cout, hc_c0, hc_cout;
  logic [15:0] cla_a, cla_b, cla_s, csel_a, csel_b, csel_s;
  logic        cla_c0, cla_cout, cla_blk_p, cla_blk_g, csel_c0, csel_cout;
  logic [3:0]  csel_gc;
  logic [63:0] cla64_a, cla64_b, cla64_s;
  logic        cla64_c0, cla64_cout, cla64_sec_p, cla64_sec_g;

  int n_ripple_all, n_gen_low, n_cla_blk_prop, n_cla_blk_gen, n_cla_grp_cross;
  int n_csel_pick1, n_csel_pick0, n_csel_chain;
  int n_cla64_sec_prop, n_cla64_blk_cross;

  fast_adders_top dut (.*);

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check8(string name, logic [8:0] got, logic [8:0] exp_sum);
    checks++;
    if (got !== exp_sum) begin
      failures++;
      if (failures <= 10) $display("%s: got %0d, expected %0d", name, got, exp_sum);
    end
  endtask

  task automatic check16(logic [15:0] x, logic [15:0] y, logic ci);
    logic [16:0] e, e0;
    cla_a = x; cla_b = y; cla_c0 = ci;
    csel_a = x; csel_b = y; csel_c0 = ci;
    e  = 17'(x) + 17'(y) + 17'(ci);
    e0 = 17'(x) + 17'(y);
    #1;
    checks += 4;
    if ({cla_cout, cla_s} !== e) begin
      failures++;
      if (failures <= 10) $display("cla: %h + %h + %b = %h", x, y, ci, {cla_cout, cla_s});
    end
    if ({csel_cout, csel_s} !== e) begin
      failures++;
      if (failures <= 10) $display("csel: %h + %h + %b = %h", x, y, ci, {csel_cout, csel_s});
    end
    if (cla_blk_p !== (&(x | y)) || cla_blk_g !== e0[16]) begin
      failures++;
      if (failures <= 10) $display("cla block P/G wrong for %h, %h", x, y);
    end
    // group carries of the carry-select adder against the integer sum
    begin
      logic [3:0] egc;
      for (int q = 0; q < 4; q++) begin
        logic [16:0] low;
        low = 17'(x & 16'((32'(1) << (4*q)) - 32'(1))) + 17'(y & 16'((32'(1) << (4*q)) - 32'(1))) + 17'(ci);
        egc[q] = low[4*q];
      end
      if (csel_gc !== egc) begin
        failures++;
        if (failures <= 10) $display("csel group carries %b, expected %b", csel_gc, egc);
      end
    end
    // mechanism counters, from the operands
    if (cla_blk_p && !cla_blk_g && ci && e[16]) n_cla_blk_prop++;
    if (cla_blk_g) n_cla_blk_gen++;
    for (int q = 0; q < 3; q++) begin
      // carry made in group q, passed through the whole group q+1
      logic [16:0] t;
      t = 17'(x[4*q +: 4]) + 17'(y[4*q +: 4]);
      if (t[4] && ((x[4*(q+1) +: 4] ^ y[4*(q+1) +: 4]) == 4'hf)) n_cla_grp_cross++;
    end
    for (int q = 1; q < 4; q++) begin
      if (csel_gc[q]) n_csel_pick1++; else n_csel_pick0++;
    end
    if (ci && ((x ^ y) == 16'hffff) && csel_cout) n_csel_chain++;
  endtask

  task automatic check64(logic [63:0] x, logic [63:0] y, logic ci);
    logic [64:0] e, e0;
    cla64_a = x; cla64_b = y; cla64_c0 = ci;
    e  = 65'(x) + 65'(y) + 65'(ci);
    e0 = 65'(x) + 65'(y);
    #1;
    checks += 2;
    if ({cla64_cout, cla64_s} !== e) begin
      failures++;
      if (failures <= 10) $display("cla64: %h + %h + %b = %h", x, y, ci, {cla64_cout, cla64_s});
    end
    if (cla64_sec_p !== (&(x | y)) || cla64_sec_g !== e0[64]) begin
      failures++;
      if (failures <= 10) $display("cla64 section P/G wrong for %h, %h", x, y);
    end
    if (ci && ((x ^ y) == '1) && cla64_cout) n_cla64_sec_prop++;
    for (int q = 0; q < 3; q++) begin
      logic [16:0] t;
      t = 17'(x[16*q +: 16]) + 17'(y[16*q +: 16]);
      if (t[16] && ((x[16*(q+1) +: 16] ^ y[16*(q+1) +: 16]) == 16'hffff)) n_cla64_blk_cross++;
    end
  endtask

  initial begin : stimulus
    for (int v = 0; v < 131072; v++) begin
      logic [8:0] e;
      {ks_a, ks_b, ks_c0} = 17'(v);
      {lf_a, lf_b, lf_c0} = 17'(v);
      {kn_a, kn_b, kn_c0} = 17'(v);
      {hc_a, hc_b, hc_c0} = 17'(v);
      e = 9'(ks_a) + 9'(ks_b) + 9'(ks_c0);
      #1;
      check8("kogge_stone",    {ks_cout, ks_s}, e);
      check8("ladner_fischer", {lf_cout, lf_s}, e);
      check8("knowles",        {kn_cout, kn_s}, e);
      check8("han_carlson",    {hc_cout, hc_s}, e);
      if (ks_c0 && ((ks_a ^ ks_b) == 8'hff) && ks_cout) n_ripple_all++;
      if (ks_a[0] && ks_b[0] && ((ks_a[7:1] ^ ks_b[7:1]) == 7'h7f) && ks_cout) n_gen_low++;
    end

    check16(16'hffff, 16'h0000, 1'b1);
    check16(16'h5555, 16'haaaa, 1'b1);
    check16(16'h000f, 16'hfff1, 1'b0);
    check16(16'hffff, 16'hffff, 1'b0);
    for (int n = 0; n < 100000; n++)
      check16(16'($urandom), 16'($urandom), 1'($urandom));

    check64('1, '0, 1'b1);
    check64(64'h0000_0000_ffff_8000, 64'h0000_0000_0000_8000, 1'b0);
    for (int n = 0; n < 20000; n++) begin
      logic [63:0] x, y;
      x = {$urandom, $urandom}; y = {$urandom, $urandom};
      // every fourth pair makes the upper 48 bits all-propagate
      if (n % 4 == 0) y[63:16] = ~x[63:16];
      check64(x, y, 1'($urandom));
    end

    $display("mechanisms: ripple_all=%0d gen_low=%0d cla_blk_prop=%0d cla_blk_gen=%0d",
             n_ripple_all, n_gen_low, n_cla_blk_prop, n_cla_blk_gen);
    $display("            cla_grp_cross=%0d csel_pick1=%0d csel_pick0=%0d csel_chain=%0d",
             n_cla_grp_cross, n_csel_pick1, n_csel_pick0, n_csel_chain);
    $display("            cla64_sec_prop=%0d cla64_blk_cross=%0d", n_cla64_sec_prop, n_cla64_blk_cross);
    checks += 10;
    if (n_cla64_sec_prop  == 0) begin failures++; $display("never exercised: cla64_sec_prop");  end
    if (n_cla64_blk_cross == 0) begin failures++; $display("never exercised: cla64_blk_cross"); end
    if (n_ripple_all    == 0) begin failures++; $display("never exercised: ripple_all");    end
    if (n_gen_low       == 0) begin failures++; $display("never exercised: gen_low");       end
    if (n_cla_blk_prop  == 0) begin failures++; $display("never exercised: cla_blk_prop");  end
    if (n_cla_blk_gen   == 0) begin failures++; $display("never exercised: cla_blk_gen");   end
    if (n_cla_grp_cross == 0) begin failures++; $display("never exercised: cla_grp_cross"); end
    if (n_csel_pick1    == 0) begin failures++; $display("never exercised: csel_pick1");    end
    if (n_csel_pick0    == 0) begin failures++; $display("never exercised: csel_pick0");    end
    if (n_csel_chain    == 0) begin failures++; $display("never exercised: csel_chain");    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
