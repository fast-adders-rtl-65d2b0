// knowles_adder: 8-bit Knowles minimum-depth parallel-prefix adder.
//
// Kogge-Stone and Ladner-Fischer are the two ends of a family of
// minimum-depth (log2 N level) prefix graphs that trade operator count
// and wiring against fan-out. This is one member between them for 8 bits,
// with lateral fan-out 1 at levels 1 and 2 and 4 at level 3:
//   level 1: (7:6) (6:5) (5:4) (3:2) (2:1) (1:0)
//   level 2: (7:4) = (7:6) o (5:4)    (6:4) = (6:5) o (4:4)
//            (3:0) = (3:2) o (1:0)    (2:0) = (2:1) o (0:0)
//   level 3: (7:0) (6:0) (5:0) (4:0) = (i:4) o (3:0)
// The node list follows the reference graph. Only the 8-bit member is
// defined, so the width is fixed. Carries and sums come from prefix_sum.
// Purely combinational.
module knowles_adder
  import adder_pkg::*;
(
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       c0,
  output logic [7:0] s,
  output logic       cout
);

  pg_t  [7:0] l0, l1, l2, l3;
  logic [7:0] psum;

  pg_gen #(.N(8)) u_pg (.a(a), .b(b), .pg(l0), .psum(psum));

  // level 1: spans of two, columns 4 and 0 pass
  for (genvar i = 0; i < 8; i++) begin : g_l1
    if (i == 0 || i == 4) begin : g_pass
      assign l1[i] = l0[i];
    end else begin : g_op
      prefix_op u_op (.hi(l0[i]), .lo(l0[i-1]), .res(l1[i]));
    end
  end

  // level 2: each node reaches two columns down, fan-out one
  for (genvar i = 0; i < 8; i++) begin : g_l2
    if (i == 2 || i == 3 || i == 6 || i == 7) begin : g_op
      prefix_op u_op (.hi(l1[i]), .lo(l1[i-2]), .res(l2[i]));
    end else begin : g_pass
      assign l2[i] = l1[i];
    end
  end

  // level 3: (3:0) drives the whole upper half
  for (genvar i = 0; i < 8; i++) begin : g_l3
    if (i >= 4) begin : g_op
      prefix_op u_op (.hi(l2[i]), .lo(l2[3]), .res(l3[i]));
    end else begin : g_pass
      assign l3[i] = l2[i];
    end
  end

  prefix_sum #(.N(8)) u_sum (
    .pg_pre(l3), .psum(psum), .c0(c0), .s(s), .cout(cout)
  );

endmodule
