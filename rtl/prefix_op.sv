// prefix_op: the prefix operator "o" of a parallel-prefix adder.
//
// Combines the (P,G) pair of a more significant span i:m with that of the
// adjacent less significant span m-1:j into the pair of span i:j:
//   P_i:j = P_i:m & P_m-1:j
//   G_i:j = G_i:m | (P_i:m & G_m-1:j)
// The operator is associative, which is what lets the Kogge-Stone,
// Ladner-Fischer, Knowles and Han-Carlson networks evaluate it in
// different orders. Purely combinational; one AND and one AND-OR.
// Ports carry the pair as the packed struct adder_pkg::pg_t (a coding
// choice of this design).
module prefix_op
  import adder_pkg::*;
(
  input  pg_t hi,   // span i:m
  input  pg_t lo,   // span m-1:j
  output pg_t res   // span i:j
);

  assign res.p = hi.p & lo.p;
  assign res.g = hi.g | (hi.p & lo.g);

endmodule
