// pg_gen: bit-level propagate, generate and partial sum.
//
// For every bit position in parallel:
//   P_i = A_i | B_i,  G_i = A_i & B_i,  Psum_i = A_i ^ B_i.
// These feed the carry network of any look-ahead or prefix adder; the
// sum is later formed as S_i = Psum_i ^ C_i. Purely combinational, one
// gate level. Width N defaults to the 8 bits of the reference examples.
module pg_gen
  import adder_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output pg_t  [N-1:0] pg,    // (P_i, G_i)
  output logic [N-1:0] psum   // partial sums
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      pg[i].p = a[i] | b[i];
      pg[i].g = a[i] & b[i];
    end
  end

  assign psum = a ^ b;

endmodule
