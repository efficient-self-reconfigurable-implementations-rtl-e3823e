// gp_pkg: function set of the genetic-programming tree template.
//
// Each member of the function set is one logiclet; a node selects one of
// them with a code of log2(m) bits, so a tree of n nodes is described by a
// representation word of n*log2(m) bits. The paper does not list the
// function set: the four two-input members below (m = 4, 2-bit codes) are
// this design's choice.
package gp_pkg;
  typedef enum logic [1:0] {
    GP_ADD = 2'd0,   // a + b   (modulo 2^DATA_W)
    GP_SUB = 2'd1,   // a - b   (modulo 2^DATA_W)
    GP_AND = 2'd2,   // a & b
    GP_XOR = 2'd3    // a ^ b
  } gp_func_e;

  parameter int unsigned NUM_FUNCS = 4;
  parameter int unsigned FUNC_W    = $clog2(NUM_FUNCS);
endpackage
