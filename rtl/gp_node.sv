// gp_node: one node of the self-reconfigurable genetic-programming tree.
//
// All members of the function set are built side by side as logiclets, each
// fed by the node's two inputs a and b (its children, or terminals at a leaf).
// A multiplexer driven by the node's log2(m)-bit field of the representation
// word chooses which logiclet's output leaves the node. Changing the node's
// function is therefore a change of a stored code, not of the logic. The
// logiclets-plus-multiplexer structure follows the paper; the function
// set (gp_pkg) is this design's choice. Purely combinational.
module gp_node
  import gp_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  logic [FUNC_W-1:0] func,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] y
);
  logic [DATA_W-1:0] lg [NUM_FUNCS];

  // logiclets
  assign lg[GP_ADD] = a + b;
  assign lg[GP_SUB] = a - b;
  assign lg[GP_AND] = a & b;
  assign lg[GP_XOR] = a ^ b;

  // multiplexer
  assign y = lg[func];
endmodule
