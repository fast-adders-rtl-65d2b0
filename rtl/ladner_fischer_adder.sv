// ladner_fischer_adder: N-bit Ladner-Fischer parallel-prefix adder.
//
// Computes s = a + b + c0 with carry out cout, purely combinationally, in
// the minimum log2(N) prefix levels but with far fewer operator nodes than
// Kogge-Stone, paid for with high fan-out. At level k the bits are seen as
// blocks of 2^k; in each block the upper half combines with the top bit
// of the lower half, which therefore drives 2^(k-1) nodes. For N = 8:
//   level 1: (7:6) (5:4) (3:2) (1:0)
//   level 2: (7:4) (6:4) (3:0) (2:0)        (5:4) and (1:0) fan out to 2
//   level 3: (7:0) (6:0) (5:0) (4:0)        (3:0) fans out to 4
// The 8-bit graph follows the reference; the loop that builds it for any
// power-of-two N is this design's own. Carries and sums are formed by
// prefix_sum exactly as in kogge_stone_adder.
module ladner_fischer_adder
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
  pg_t  [N-1:0] node [L+1];

  pg_gen #(.N(N)) u_pg (.a(a), .b(b), .pg(pg), .psum(psum));

  assign node[0] = pg;

  for (genvar k = 1; k <= L; k++) begin : g_level
    localparam int H = 1 << (k - 1);  // half-block size at this level
    for (genvar i = 0; i < N; i++) begin : g_bit
      // top bit of the lower half of i's block
      localparam int J = (i / (2 * H)) * (2 * H) + H - 1;
      if ((i / H) % 2 == 1) begin : g_op
        prefix_op u_op (.hi(node[k-1][i]), .lo(node[k-1][J]), .res(node[k][i]));
      end else begin : g_pass
        assign node[k][i] = node[k-1][i];
      end
    end
  end

  prefix_sum #(.N(N)) u_sum (
    .pg_pre(node[L]), .psum(psum), .c0(c0), .s(s), .cout(cout)
  );

endmodule
