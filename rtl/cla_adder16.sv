// cla_adder16: 16-bit two-level carry look-ahead adder.
//
// Computes s = a + b + c0 with carry out cout (C16), purely
// combinationally. Bit-level P_i = A_i + B_i, G_i = A_i B_i and
// Psum_i = A_i ^ B_i come from pg_gen. The bits form four non-overlapping
// 4-bit groups (3:0, 7:4, 11:8, 15:12). A block-level cla_lcu4 turns the
// four group pairs (G_i+3:i, P_i+3:i) and C0 into the group carries C4,
// C8, C12 and C16 = G_15:0 + P_15:0 C0, and brings out the block pair
// (P_15:0, G_15:0) so that a further level could be stacked above. Each
// group's own cla_lcu4 then makes the carries inside the group from its
// group carry, and S_i = Psum_i ^ C_i. The group pairs are produced by the
// group units themselves (their grp outputs do not depend on the carry
// in), so there is no combinational loop. Critical path: pg_gen, group
// (P,G), block carries, group carries, sum XOR.
module cla_adder16
  import adder_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        c0,
  output logic [15:0] s,
  output logic        cout,
  output logic        blk_p,   // P_15:0
  output logic        blk_g    // G_15:0
);

  pg_t  [15:0] pg;
  logic [15:0] psum;
  logic [16:0] c;        // c[i]: carry into bit i, c[16] = C16
  pg_t  [3:0]  grp;      // (P,G) of each 4-bit group
  logic [3:0]  gc;       // C4, C8, C12, C16
  pg_t         blk;

  pg_gen #(.N(16)) u_pg (.a(a), .b(b), .pg(pg), .psum(psum));

  logic [3:0] gcin;         // carry into each group: C0, C4, C8, C12
  logic [3:0][2:0] cin_grp; // carries inside each group

  assign gcin = {gc[2:0], c0};

  for (genvar q = 0; q < 4; q++) begin : g_group
    logic [3:0] cg;
    cla_lcu4 u_lcu (
      .pg (pg[4*q +: 4]),
      .cin(gcin[q]),
      .c  (cg),
      .grp(grp[q])
    );
    // the group carry out is taken from the block unit instead; the two
    // must agree
    assign cin_grp[q] = cg[2:0];
    always_comb assert final (cg[3] == gc[q])
      else $error("cla_adder16: group %0d carry out disagrees with block unit", q);
  end

  cla_lcu4 u_blk (.pg(grp), .cin(c0), .c(gc), .grp(blk));

  always_comb begin
    for (int q = 0; q < 4; q++)
      c[4*q +: 4] = {cin_grp[q], gcin[q]};
    c[16] = gc[3];
  end

  assign s     = psum ^ c[15:0];
  assign cout  = c[16];
  assign blk_p = blk.p;
  assign blk_g = blk.g;

endmodule
