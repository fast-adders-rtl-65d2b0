// prefix_sum: carry and sum stage at the bottom of a parallel-prefix adder.
//
// Given the prefix pairs (P,G)_i:0 for every bit i, the partial sums and
// the carry in C0, forms
//   C_i+1 = G_i:0 | (P_i:0 & C0)   for i = 0 .. N-1
//   S_i   = Psum_i ^ C_i           with C_0 = C0
// and brings out C_N as the carry out. Keeping C0 out of the prefix
// network and folding it in here is what the reference 8-bit Kogge-Stone
// design does. Purely combinational, two gate levels.
module prefix_sum
  import adder_pkg::*;
#(
  parameter int N = 8
) (
  input  pg_t  [N-1:0] pg_pre,  // (P,G) of span i:0 at index i
  input  logic [N-1:0] psum,
  input  logic         c0,
  output logic [N-1:0] s,
  output logic         cout
);

  logic [N:0] c;  // c[i] is the carry into bit i

  always_comb begin
    c[0] = c0;
    for (int i = 0; i < N; i++)
      c[i+1] = pg_pre[i].g | (pg_pre[i].p & c0);
  end

  assign s    = psum ^ c[N-1:0];
  assign cout = c[N];

endmodule
