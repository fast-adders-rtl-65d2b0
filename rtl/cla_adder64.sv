// cla_adder64: 64-bit three-level carry look-ahead adder.
//
// Stacks the look-ahead hierarchy one level higher than cla_adder16:
// bits form 4-bit groups, four groups form a 16-bit block, and four blocks
// form this 64-bit section. A section-level cla_lcu4 takes the four block
// pairs (P_15:0, G_15:0 of each block, brought out by cla_adder16) and C0,
// and produces the block carries C16, C32, C48 and C64 in two-level form;
// each block then uses its block carry as its own carry in. The section
// pair (P_63:0, G_63:0) is brought out. The carry out is taken from the
// section unit; each block's own carry out must agree with it, which an
// assertion checks. Purely combinational. The group / block / section
// names follow the reference; the 64-bit width and the exact stacking are
// this design's reading of how the hierarchy continues.
module cla_adder64
  import adder_pkg::*;
(
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic        c0,
  output logic [63:0] s,
  output logic        cout,
  output logic        sec_p,   // P_63:0
  output logic        sec_g    // G_63:0
);

  pg_t  [3:0] blk;    // (P,G) of each 16-bit block
  logic [3:0] bc;     // C16, C32, C48, C64 from the section unit
  logic [3:0] bcin;   // carry into each block
  pg_t        sec;

  assign bcin = {bc[2:0], c0};

  for (genvar q = 0; q < 4; q++) begin : g_block
    logic co;
    cla_adder16 u_blk (
      .a    (a[16*q +: 16]),
      .b    (b[16*q +: 16]),
      .c0   (bcin[q]),
      .s    (s[16*q +: 16]),
      .cout (co),
      .blk_p(blk[q].p),
      .blk_g(blk[q].g)
    );
    always_comb assert final (co == bc[q])
      else $error("cla_adder64: block %0d carry out disagrees with section unit", q);
  end

  cla_lcu4 u_sec (.pg(blk), .cin(c0), .c(bc), .grp(sec));

  assign cout  = bc[3];
  assign sec_p = sec.p;
  assign sec_g = sec.g;

endmodule
