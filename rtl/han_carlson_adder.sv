// han_carlson_adder: N-bit Han-Carlson parallel-prefix adder.
//
// Trades one extra prefix level for about half the operator nodes and
// wiring of Kogge-Stone, while keeping fan-out low:
//   level 1        each odd bit i combines with bit i-1, giving (i:i-1);
//   levels 2..L    a Kogge-Stone network over the odd bits only: at level k
//                  odd bit i combines with odd bit i - 2^(k-1);
//   level L+1      each even bit i > 0 combines with the finished prefix
//                  of bit i-1 (fan-out one), giving (i:0).
// L = log2(N), so the network has log2(N)+1 levels. The reference only
// names this architecture and its single extra low-fan-out stage at the
// end; the exact node arrangement here is the usual Han-Carlson one and
// is this design's choice, as is the 8-bit default. Carries and sums come
// from prefix_sum. Purely combinational.
module han_carlson_adder
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
  pg_t  [N-1:0] node [L+2];

  pg_gen #(.N(N)) u_pg (.a(a), .b(b), .pg(pg), .psum(psum));

  assign node[0] = pg;

  for (genvar k = 1; k <= L; k++) begin : g_level
    localparam int D = (k == 1) ? 1 : (1 << (k - 1));
    for (genvar i = 0; i < N; i++) begin : g_bit
      if ((i % 2 == 1) && (i >= D)) begin : g_op
        prefix_op u_op (.hi(node[k-1][i]), .lo(node[k-1][i-D]), .res(node[k][i]));
      end else begin : g_pass
        assign node[k][i] = node[k-1][i];
      end
    end
  end

  // final level: even bits pick up the prefix of the odd bit below
  for (genvar i = 0; i < N; i++) begin : g_last
    if ((i % 2 == 0) && (i > 0)) begin : g_op
      prefix_op u_op (.hi(node[L][i]), .lo(node[L][i-1]), .res(node[L+1][i]));
    end else begin : g_pass
      assign node[L+1][i] = node[L][i];
    end
  end

  prefix_sum #(.N(N)) u_sum (
    .pg_pre(node[L+1]), .psum(psum), .c0(c0), .s(s), .cout(cout)
  );

endmodule
