// bf_dist_mem: data memory of the shortest-path unit, holding the current
// distance estimate of every vertex.
//
// The relaxation pipeline reads the distances of both end points of an edge
// in its first stage and writes the improved distance of the destination in
// its third stage, so the memory has two asynchronous read ports (rdata_a,
// rdata_b follow raddr_a, raddr_b in the same cycle) and one write port that
// takes effect at the rising clock edge. The paper's block diagram shows
// a single read address and read data bus; carrying both end points on it,
// as two ports, is this design's reading. Contents are not reset; the
// control circuit initialises every vertex before a run.
module bf_dist_mem
  import bf_pkg::*;
(
  input  logic  clk,
  input  logic  we,
  input  vid_t  waddr,
  input  dist_t wdata,
  input  vid_t  raddr_a,
  output dist_t rdata_a,
  input  vid_t  raddr_b,
  output dist_t rdata_b
);
  dist_t mem [MAX_V];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];
endmodule
