// fast_adders_top: the fast-adder architectures side by side.
//
// Each adder is an independent combinational unit with its own operands,
// carry in, sum and carry out, so that the architectures can be compared
// on the same inputs or used on their own:
//   ks_*    8-bit Kogge-Stone parallel-prefix adder (the main design)
//   lf_*    8-bit Ladner-Fischer parallel-prefix adder
//   kn_*    8-bit Knowles parallel-prefix adder (fan-outs 1, 1, 4)
//   hc_*    8-bit Han-Carlson parallel-prefix adder
//   cla_*   16-bit two-level carry look-ahead adder (4-bit groups),
//           with the block propagate/generate pair brought out
//   cla64_* 64-bit three-level carry look-ahead adder (groups, blocks,
//           section), with the section propagate/generate pair
//   csel_*  16-bit carry-select adder of four 4-bit groups, with the
//           group carries brought out
// Nothing is registered: every output settles combinationally from the
// inputs of the same adder.
module fast_adders_top (
  input  logic [7:0]  ks_a,   ks_b,
  input  logic        ks_c0,
  output logic [7:0]  ks_s,
  output logic        ks_cout,

  input  logic [7:0]  lf_a,   lf_b,
  input  logic        lf_c0,
  output logic [7:0]  lf_s,
  output logic        lf_cout,

  input  logic [7:0]  kn_a,   kn_b,
  input  logic        kn_c0,
  output logic [7:0]  kn_s,
  output logic        kn_cout,

  input  logic [7:0]  hc_a,   hc_b,
  input  logic        hc_c0,
  output logic [7:0]  hc_s,
  output logic        hc_cout,

  input  logic [15:0] cla_a,  cla_b,
  input  logic        cla_c0,
  output logic [15:0] cla_s,
  output logic        cla_cout,
  output logic        cla_blk_p,
  output logic        cla_blk_g,

  input  logic [63:0] cla64_a, cla64_b,
  input  logic        cla64_c0,
  output logic [63:0] cla64_s,
  output logic        cla64_cout,
  output logic        cla64_sec_p,
  output logic        cla64_sec_g,

  input  logic [15:0] csel_a, csel_b,
  input  logic        csel_c0,
  output logic [15:0] csel_s,
  output logic        csel_cout,
  output logic [3:0]  csel_gc
);

  kogge_stone_adder #(.N(8)) u_ks (
    .a(ks_a), .b(ks_b), .c0(ks_c0), .s(ks_s), .cout(ks_cout)
  );

  ladner_fischer_adder #(.N(8)) u_lf (
    .a(lf_a), .b(lf_b), .c0(lf_c0), .s(lf_s), .cout(lf_cout)
  );

  knowles_adder u_kn (
    .a(kn_a), .b(kn_b), .c0(kn_c0), .s(kn_s), .cout(kn_cout)
  );

  han_carlson_adder #(.N(8)) u_hc (
    .a(hc_a), .b(hc_b), .c0(hc_c0), .s(hc_s), .cout(hc_cout)
  );

  cla_adder16 u_cla (
    .a(cla_a), .b(cla_b), .c0(cla_c0), .s(cla_s), .cout(cla_cout),
    .blk_p(cla_blk_p), .blk_g(cla_blk_g)
  );

  cla_adder64 u_cla64 (
    .a(cla64_a), .b(cla64_b), .c0(cla64_c0), .s(cla64_s), .cout(cla64_cout),
    .sec_p(cla64_sec_p), .sec_g(cla64_sec_g)
  );

  carry_select_adder #(.N(16), .W(4)) u_csel (
    .a(csel_a), .b(csel_b), .c0(csel_c0), .s(csel_s), .cout(csel_cout),
    .gc(csel_gc)
  );

endmodule
