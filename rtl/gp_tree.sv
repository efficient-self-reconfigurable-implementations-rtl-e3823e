// gp_tree: self-reconfigurable binary tree template for genetic programming.
//
// A complete binary tree of N_NODES = 2^DEPTH - 1 gp_node instances with
// fixed interconnection evaluates a program on 2^DEPTH terminal inputs (two
// per leaf). Which function every node applies is set by the representation
// word rep, N_NODES fields of log2(m) bits held in flip-flops (distributed
// memory). The evolution phase changes the program by rewriting this word:
// either whole (rep_we, e.g. to bring in another member of the population) or
// one node at a time (node_we, node_idx, node_func, e.g. for a mutation).
//
// Node numbering is heap order: node 0 is the root, the children of node i
// are 2i+1 and 2i+2; field i of rep is rep[i*FUNC_W +: FUNC_W]. Leaf j
// (node N_NODES/2 + j) takes terminals 2j and 2j+1.
//
// Timing: the tree is combinational from terminals and rep to y_comb; result
// registers it (one cycle latency). Writes to rep take effect at the clock
// edge, so result reflects the new program one cycle after the write. rep
// resets to all zeros (every node GP_ADD). DEPTH = 3 matches the tree drawn
// in the paper; the data width is this design's choice.
module gp_tree
  import gp_pkg::*;
#(
  parameter int unsigned DEPTH  = 3,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned N_NODES = (1 << DEPTH) - 1,
  parameter int unsigned N_TERMS = 1 << DEPTH,
  parameter int unsigned IDX_W   = (N_NODES > 1) ? $clog2(N_NODES) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        rep_we,
  input  logic [N_NODES*FUNC_W-1:0]   rep_wdata,
  input  logic                        node_we,
  input  logic [IDX_W-1:0]            node_idx,
  input  logic [FUNC_W-1:0]           node_func,
  output logic [N_NODES*FUNC_W-1:0]   rep,
  input  logic [N_TERMS-1:0][DATA_W-1:0] terms,
  output logic [DATA_W-1:0]           y_comb,
  output logic [DATA_W-1:0]           result
);
  logic [DATA_W-1:0] node_y [N_NODES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rep <= '0;
    end else if (rep_we) begin
      rep <= rep_wdata;
    end else if (node_we && 32'(node_idx) < N_NODES) begin
      rep[node_idx*FUNC_W +: FUNC_W] <= node_func;
    end
  end

  for (genvar i = 0; i < N_NODES; i++) begin : g_node
    logic [DATA_W-1:0] a, b;
    if (i < N_NODES / 2) begin : g_inner
      assign a = node_y[2*i + 1];
      assign b = node_y[2*i + 2];
    end else begin : g_leaf
      assign a = terms[2*(i - N_NODES/2)];
      assign b = terms[2*(i - N_NODES/2) + 1];
    end
    gp_node #(.DATA_W(DATA_W)) u_node (
      .func(rep[i*FUNC_W +: FUNC_W]), .a, .b, .y(node_y[i]));
  end

  assign y_comb = node_y[0];

  always_ff @(posedge clk) begin
    if (!rst_n) result <= '0;
    else        result <= y_comb;
  end
endmodule
