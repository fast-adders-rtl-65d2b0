// cla_lcu4: 4-way look-ahead carry unit.
//
// Takes four adjacent (P,G) pairs, index 0 least significant, and the carry
// into the first of them, and produces all four carries in parallel in
// two-level sum-of-products form, plus the (P,G) of the whole group:
//   c[0] = C1 = G0 + P0 C0
//   c[1] = C2 = G1 + P1 G0 + P1 P0 C0
//   c[2] = C3 = G2 + P2 G1 + P2 P1 G0 + P2 P1 P0 C0
//   c[3] = C4 = G3 + P3 G2 + P3 P2 G1 + P3 P2 P1 G0 + P3 P2 P1 P0 C0
//   grp.g = G3 + P3 G2 + P3 P2 G1 + P3 P2 P1 G0,  grp.p = P3 P2 P1 P0
// The same unit serves at bit level (inputs are bit P_i, G_i) and at group
// level (inputs are G_i+3:i, P_i+3:i of 4-bit groups, outputs the group
// carries C4, C8, C12, C16 and the block pair G_15:0, P_15:0). Purely
// combinational; the equations are written out flat, not as a ripple.
module cla_lcu4
  import adder_pkg::*;
(
  input  pg_t  [3:0] pg,
  input  logic       cin,
  output logic [3:0] c,    // carries out of positions 0..3
  output pg_t        grp   // group (P,G)
);

  logic [3:0] p, g;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      p[i] = pg[i].p;
      g[i] = pg[i].g;
    end
  end

  assign c[0] = g[0] | (p[0] & cin);
  assign c[1] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
  assign c[2] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0])
              | (p[2] & p[1] & p[0] & cin);
  assign c[3] = grp.g | (grp.p & cin);

  assign grp.g = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1])
               | (p[3] & p[2] & p[1] & g[0]);
  assign grp.p = &p;

endmodule
