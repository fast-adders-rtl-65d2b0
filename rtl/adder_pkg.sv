// adder_pkg: types and functions shared by the fast-adder blocks.
//
// pg_t is the (propagate, generate) pair that every look-ahead and
// parallel-prefix structure passes around. Propagate is the OR form,
// P = A + B, as used throughout this design (the XOR form would work
// equally well for the carries; OR was chosen to match the reference
// equations). The operator "o" that combines two pairs is the module
// prefix_op.
package adder_pkg;

  typedef struct packed {
    logic p;  // span propagates a carry
    logic g;  // span generates a carry
  } pg_t;

endpackage
