// carry_select_adder: N-bit carry-select adder of equal W-bit groups.
//
// The operands are cut into N/W groups. Every group computes its sum and
// carry out for both possible carries in at once (csel_group); the group
// carries then ripple from group to group, each passing through just one
// multiplexer per group. Delay is roughly one W-bit ripple plus N/W
// multiplexers. The group carries (bit 0 is c0) are brought out on gc for
// observation. Purely combinational. N = 16 and W = 4 are this design's
// choices; N must be a multiple of W. Groups of equal size are used; a
// variant with wider high-order groups would balance delays better.
module carry_select_adder #(
  parameter int N = 16,
  parameter int W = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           c0,
  output logic [N-1:0]   s,
  output logic           cout,
  output logic [N/W-1:0] gc    // carry into each group
);

  localparam int NG = N / W;

  logic [NG:0] c;

  assign c[0] = c0;

  for (genvar q = 0; q < NG; q++) begin : g_group
    csel_group #(.W(W)) u_grp (
      .a   (a[q*W +: W]),
      .b   (b[q*W +: W]),
      .cin (c[q]),
      .s   (s[q*W +: W]),
      .cout(c[q+1])
    );
  end

  assign cout = c[NG];
  assign gc   = c[NG-1:0];

  initial begin
    assert (N % W == 0 && N >= W)
      else $error("carry_select_adder: N (%0d) must be a multiple of W (%0d)", N, W);
  end

endmodule
