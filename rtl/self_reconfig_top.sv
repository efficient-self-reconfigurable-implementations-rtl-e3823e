// self_reconfig_top: the three self-reconfigurable implementations and the
// generic logiclet interconnect, side by side.
//
// All four share one idea: the logic is compiled once, and what changes from
// one problem instance to the next is kept in on-chip memory that the chip
// rewrites itself:
//   - kmp_matcher: KMP string matching; pattern and back-edges in look-up
//     memories addressed by the automaton state.
//   - bf_sssp: Bellman-Ford shortest paths; graph edges and distances in
//     on-chip memory, relaxed by a three-stage pipeline.
//   - gp_tree: genetic-programming tree template; node functions chosen by a
//     representation word in distributed memory.
//   - logiclet_interconnect: logiclets joined by interconnects whose active
//     choice is a stored address.
// The units do not exchange data; each has its own ports (prefixes kmp_,
// bf_, gp_, ic_) and they share only the clock and the synchronous,
// active-low reset. See the individual modules for interfaces and timing.
module self_reconfig_top
  import bf_pkg::*;
  import gp_pkg::*;
#(
  parameter int unsigned KMP_CHAR_W  = 8,
  parameter int unsigned KMP_MAX_LEN = 6,
  parameter int unsigned GP_DEPTH    = 3,
  parameter int unsigned GP_DATA_W   = 8,
  parameter int unsigned IC_N        = 8,
  parameter int unsigned IC_DATA_W   = 8,
  localparam int unsigned GP_NODES   = (1 << GP_DEPTH) - 1,
  localparam int unsigned GP_TERMS   = 1 << GP_DEPTH,
  localparam int unsigned GP_IDX_W   = (GP_NODES > 1) ? $clog2(GP_NODES) : 1,
  localparam int unsigned IC_AW      = (IC_N > 1) ? $clog2(IC_N) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // string matching
  input  logic                              kmp_pat_valid,
  input  logic [KMP_CHAR_W-1:0]             kmp_pat_char,
  input  logic                              kmp_pat_last,
  output logic                              kmp_pat_ready,
  input  logic                              kmp_txt_valid,
  input  logic [KMP_CHAR_W-1:0]             kmp_txt_char,
  output logic                              kmp_txt_ready,
  output logic                              kmp_running,
  output logic                              kmp_match,
  output logic [31:0]                       kmp_match_pos,
  output logic                              kmp_backedge,
  output logic [$clog2(KMP_MAX_LEN+1)-1:0]  kmp_state,
  // shortest path
  input  logic                              bf_edge_we,
  input  eid_t                              bf_edge_addr,
  input  edge_t                             bf_edge_wdata,
  input  logic                              bf_start,
  input  logic [VW:0]                       bf_num_vertices,
  input  logic [EW:0]                       bf_num_edges,
  input  vid_t                              bf_source,
  output logic                              bf_busy,
  output logic                              bf_done,
  output logic [VW:0]                       bf_passes,
  input  vid_t                              bf_dist_raddr,
  output dist_t                             bf_dist_rdata,
  output logic                              bf_bypass,
  // genetic programming tree
  input  logic                              gp_rep_we,
  input  logic [GP_NODES*FUNC_W-1:0]        gp_rep_wdata,
  input  logic                              gp_node_we,
  input  logic [GP_IDX_W-1:0]               gp_node_idx,
  input  logic [FUNC_W-1:0]                 gp_node_func,
  output logic [GP_NODES*FUNC_W-1:0]        gp_rep,
  input  logic [GP_TERMS-1:0][GP_DATA_W-1:0] gp_terms,
  output logic [GP_DATA_W-1:0]              gp_y_comb,
  output logic [GP_DATA_W-1:0]              gp_result,
  // logiclet interconnect
  input  logic                              ic_cfg_we,
  input  logic [IC_AW-1:0]                  ic_cfg_dst,
  input  logic [IC_AW-1:0]                  ic_cfg_src,
  input  logic                              ic_cfg_active,
  input  logic [IC_N-1:0][IC_DATA_W-1:0]    ic_lg_out,
  output logic [IC_N-1:0][IC_DATA_W-1:0]    ic_lg_in,
  output logic [IC_N-1:0][IC_AW:0]          ic_conn
);
  kmp_matcher #(.CHAR_W(KMP_CHAR_W), .MAX_LEN(KMP_MAX_LEN), .POS_W(32)) u_kmp (
    .clk, .rst_n,
    .pat_valid(kmp_pat_valid), .pat_char(kmp_pat_char), .pat_last(kmp_pat_last),
    .pat_ready(kmp_pat_ready), .txt_valid(kmp_txt_valid), .txt_char(kmp_txt_char),
    .txt_ready(kmp_txt_ready), .running(kmp_running), .match(kmp_match),
    .match_pos(kmp_match_pos), .backedge(kmp_backedge), .state(kmp_state));

  bf_sssp u_bf (
    .clk, .rst_n, .edge_we(bf_edge_we), .edge_addr(bf_edge_addr),
    .edge_wdata(bf_edge_wdata), .start(bf_start), .num_vertices(bf_num_vertices),
    .num_edges(bf_num_edges), .source(bf_source), .busy(bf_busy), .done(bf_done),
    .passes(bf_passes), .dist_raddr(bf_dist_raddr), .dist_rdata(bf_dist_rdata),
    .bypass(bf_bypass));

  gp_tree #(.DEPTH(GP_DEPTH), .DATA_W(GP_DATA_W)) u_gp (
    .clk, .rst_n, .rep_we(gp_rep_we), .rep_wdata(gp_rep_wdata),
    .node_we(gp_node_we), .node_idx(gp_node_idx), .node_func(gp_node_func),
    .rep(gp_rep), .terms(gp_terms), .y_comb(gp_y_comb), .result(gp_result));

  logiclet_interconnect #(.N(IC_N), .DATA_W(IC_DATA_W)) u_ic (
    .clk, .rst_n, .cfg_we(ic_cfg_we), .cfg_dst(ic_cfg_dst), .cfg_src(ic_cfg_src),
    .cfg_active(ic_cfg_active), .lg_out(ic_lg_out), .lg_in(ic_lg_in), .conn(ic_conn));
endmodule
