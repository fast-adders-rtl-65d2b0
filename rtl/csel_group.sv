// csel_group: one group of a carry-select adder.
//
// Two W-bit adders work on the same operand slice in parallel, one
// assuming the carry into the group is 0 and one assuming it is 1. When
// the actual carry cin arrives it only has to drive two 2:1 multiplexers:
// one picks the sum S_i:j, the other the carry out C_i+1. So the delay
// from cin to the outputs is one multiplexer, whatever W is. The inner
// adders are ripple_adder (the kind of adder is this design's choice),
// and the carry-out selector is a multiplexer, like the sum selector.
// Purely combinational. W defaults to 4 bits (a choice of this design).
module csel_group #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,   // actual C_j
  output logic [W-1:0] s,     // S_i:j
  output logic         cout   // C_i+1
);

  logic [W-1:0] s0, s1;
  logic         c0_out, c1_out;

  ripple_adder #(.W(W)) u_add0 (.a(a), .b(b), .cin(1'b0), .s(s0), .cout(c0_out));
  ripple_adder #(.W(W)) u_add1 (.a(a), .b(b), .cin(1'b1), .s(s1), .cout(c1_out));

  assign s    = cin ? s1 : s0;
  assign cout = cin ? c1_out : c0_out;

endmodule
