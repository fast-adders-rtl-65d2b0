// kogge_stone_adder: N-bit Kogge-Stone parallel-prefix adder.
//
// Computes s = a + b + c0 with carry out cout, purely combinationally.
// Bit-level (P,G) and partial sums come from pg_gen. The prefix network
// has log2(N) levels; at level k (k = 1 .. log2 N) every bit i combines
// its current span with the span ending at bit i - 2^(k-1) using the
// operator "o" (prefix_op), so spans double in length at each level and
// every node has a lateral fan-out of one. Bits whose partner would lie
// below bit 0 keep their value. After the last level bit i holds
// (P,G)_i:0, and prefix_sum folds in c0 and forms the sums.
//
// For N = 8 the nodes are (7:6)..(1:0), then (7:4),(6:3),(5:2),(4:1),
// (3:0),(2:0), then (7:0),(6:0),(5:0),(4:0): the classic 8-bit KS graph.
// The 8-bit default and the OR-form propagate follow the reference
// design; the generator loop for other widths is this design's own.
module kogge_stone_adder
  import adder_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         c0,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int L = (N > 1) ? $clog2(N) : 1;

  pg_t  [N-1:0] pg;
  logic [N-1:0] psum;
  pg_t  [N-1:0] node [L+1];  // node[k][i]: span ending at bit i after level k

  pg_gen #(.N(N)) u_pg (.a(a), .b(b), .pg(pg), .psum(psum));

  assign node[0] = pg;

  for (genvar k = 1; k <= L; k++) begin : g_level
    localparam int D = 1 << (k - 1);
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (i >= D) begin : g_op
        prefix_op u_op (.hi(node[k-1][i]), .lo(node[k-1][i-D]), .res(node[k][i]));
      end else begin : g_pass
        assign node[k][i] = node[k-1][i];
      end
    end
  end

  prefix_sum #(.N(N)) u_sum (
    .pg_pre(node[L]), .psum(psum), .c0(c0), .s(s), .cout(cout)
  );

endmodule
