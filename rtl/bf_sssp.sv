// bf_sssp: self-reconfigurable single-source shortest-path unit
// (Bellman-Ford).
//
// The graph instance is not compiled into the logic. Its edges are held in an
// on-chip graph memory (edge number -> source, destination, weight) and the
// distance estimates in a data memory; a three-stage pipeline (bf_pipeline)
// relaxes one edge per clock cycle by reading and rewriting the data memory,
// and a control circuit (bf_ctrl) repeats passes over all edges. Adapting the
// hardware to another graph is a matter of writing new edges into the graph
// memory, without any host changing a configuration bit-stream.
//
// Interface:
//   edge_we/edge_addr/edge_wdata  load the graph (only while not busy)
//   start with num_vertices, num_edges, source   run (counts >= 1)
//   busy, done (one-cycle pulse), passes         progress
//   dist_raddr -> dist_rdata                     read results (combinational,
//                                                valid while not busy)
//   bypass                                       a forwarded distance was used
// A run takes num_vertices cycles of initialisation and, per pass,
// num_edges cycles plus 1 to 3 cycles of pipeline drain.
module bf_sssp
  import bf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        edge_we,
  input  eid_t        edge_addr,
  input  edge_t       edge_wdata,
  input  logic        start,
  input  logic [VW:0] num_vertices,
  input  logic [EW:0] num_edges,
  input  vid_t        source,
  output logic        busy,
  output logic        done,
  output logic [VW:0] passes,
  input  vid_t        dist_raddr,
  output dist_t       dist_rdata,
  output logic        bypass
);
  eid_t  edge_raddr;
  edge_t edge_rdata;
  logic  issue_valid, pipe_busy, pipe_wr, init_we;
  eid_t  issue_edge;
  vid_t  rd_addr_u, rd_addr_v, pipe_waddr, init_addr;
  dist_t rd_data_u, rd_data_v, pipe_wdata, init_data;
  logic  mem_we;
  vid_t  mem_waddr, mem_raddr_a;
  dist_t mem_wdata;

  lut_ram #(.WIDTH($bits(edge_t)), .DEPTH(MAX_E), .AW(EW)) u_graph_mem (
    .clk, .we(edge_we && !busy), .waddr(edge_addr), .wdata(edge_wdata),
    .raddr(edge_raddr), .rdata(edge_rdata));

  // The result read shares read port a while the unit is idle.
  assign mem_raddr_a = busy ? rd_addr_u : dist_raddr;
  assign dist_rdata  = rd_data_u;

  assign mem_we    = init_we || pipe_wr;
  assign mem_waddr = init_we ? init_addr : pipe_waddr;
  assign mem_wdata = init_we ? init_data : pipe_wdata;

  bf_dist_mem u_data_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr_a(mem_raddr_a), .rdata_a(rd_data_u),
    .raddr_b(rd_addr_v), .rdata_b(rd_data_v));

  bf_pipeline u_pipe (
    .clk, .rst_n, .in_valid(issue_valid), .in_edge(issue_edge),
    .edge_raddr, .edge_rdata,
    .rd_addr_u, .rd_data_u, .rd_addr_v, .rd_data_v,
    .wr_en(pipe_wr), .wr_addr(pipe_waddr), .wr_data(pipe_wdata),
    .busy(pipe_busy), .bypass);

  bf_ctrl u_ctrl (
    .clk, .rst_n, .start, .num_vertices, .num_edges, .source,
    .init_we, .init_addr, .init_data, .issue_valid, .issue_edge,
    .pipe_busy, .pipe_wr, .busy, .done, .passes);

  // Initialisation and relaxation never write in the same cycle.
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
    !(init_we && pipe_wr));
endmodule
