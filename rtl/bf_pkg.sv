// bf_pkg: sizes and types shared by the Bellman-Ford shortest-path unit.
//
// The graph instance lives in on-chip memory as an edge list: edge number ->
// (source vertex, destination vertex, weight). Weights and distances are
// 16-bit unsigned, the weight precision the paper evaluates; the all-ones
// distance stands for "not reached yet" (infinity). Vertex and edge counts
// are this design's choice (the paper gives none).
package bf_pkg;
  parameter int unsigned MAX_V  = 64;    // vertices
  parameter int unsigned MAX_E  = 256;   // edges
  parameter int unsigned VW     = $clog2(MAX_V);
  parameter int unsigned EW     = $clog2(MAX_E);
  parameter int unsigned WW     = 16;    // weight / distance width

  typedef logic [VW-1:0] vid_t;
  typedef logic [EW-1:0] eid_t;
  typedef logic [WW-1:0] dist_t;

  parameter dist_t INF = '1;

  typedef struct packed {
    vid_t  src;
    vid_t  dst;
    dist_t weight;
  } edge_t;
endpackage
