// ripple_adder: W-bit ripple-carry adder built from P/G/Psum.
//
// Each bit forms C_i+1 = G_i + P_i C_i with P_i = A_i + B_i, G_i = A_i B_i,
// and S_i = (A_i ^ B_i) ^ C_i, the carry rippling from bit 0 upward. It is
// the inner adder of a carry-select group, where its width is small.
// Purely combinational; delay grows linearly with W.
module ripple_adder #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  always_comb begin
    logic cy;
    cy = cin;
    for (int i = 0; i < W; i++) begin
      s[i] = a[i] ^ b[i] ^ cy;
      cy   = (a[i] & b[i]) | ((a[i] | b[i]) & cy);
    end
    cout = cy;
  end

endmodule
