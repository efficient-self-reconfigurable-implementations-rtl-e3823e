// bf_pipeline: three-stage edge relaxation pipeline of the Bellman-Ford unit.
//
// Stage 1 (memory read) takes an edge number, looks the edge up in the graph
// memory and reads the distances of its source u and destination v from the
// data memory. Stage 2 (edge relaxation) computes d(u) + w(u,v) and decides
// whether it improves d(v). Stage 3 (memory write) writes the improved d(v)
// back. One edge enters per clock cycle, so the unit relaxes one edge per
// cycle. The three stages and their memory connections follow the paper.
//
// Hazards are this design's addition: an edge in stage 1 may read a distance
// that an older edge in stage 2 or 3 is about to change. Stage 1 therefore
// takes the value from stage 2 (newest) or stage 3 when the vertex matches
// and that stage will write (bypass). With it the pipeline gives exactly the
// result of relaxing the edges one after the other, so the usual
// Bellman-Ford bounds hold.
//
// Arithmetic: unsigned; a source at infinity never relaxes, and a sum that
// overflows 16 bits is never an improvement.
//
// Timing: in_valid/in_edge in cycle t; the edge is in stage 2 in t+1 and its
// write (wr_en) happens at the clock edge ending cycle t+2. busy is high while
// any edge is in stages 2 or 3. bypass pulses when a forwarded value is used.
module bf_pipeline
  import bf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  eid_t  in_edge,
  // graph memory read port
  output eid_t  edge_raddr,
  input  edge_t edge_rdata,
  // data memory read ports
  output vid_t  rd_addr_u,
  input  dist_t rd_data_u,
  output vid_t  rd_addr_v,
  input  dist_t rd_data_v,
  // data memory write port
  output logic  wr_en,
  output vid_t  wr_addr,
  output dist_t wr_data,
  output logic  busy,
  output logic  bypass
);
  typedef struct packed {
    logic  valid;
    vid_t  v;
    dist_t du;
    dist_t dv;
    dist_t w;
  } s2_t;

  typedef struct packed {
    logic  valid;     // a write is pending
    vid_t  v;
    dist_t d;
  } s3_t;

  s2_t s2;
  s3_t s3;

  // ---- stage 2: relaxation (combinational part) ----
  logic [WW:0] sum;
  logic        s2_upd;
  assign sum    = {1'b0, s2.du} + {1'b0, s2.w};
  assign s2_upd = s2.valid && (s2.du != INF) && !sum[WW] && (sum[WW-1:0] < s2.dv);

  // ---- stage 1: memory read with bypass ----
  edge_t e;
  dist_t du1, dv1;
  logic  byp_u2, byp_u3, byp_v2, byp_v3;

  assign edge_raddr = in_edge;
  assign e          = edge_rdata;
  assign rd_addr_u  = e.src;
  assign rd_addr_v  = e.dst;

  assign byp_u2 = s2_upd && (s2.v == e.src);
  assign byp_u3 = s3.valid && (s3.v == e.src);
  assign byp_v2 = s2_upd && (s2.v == e.dst);
  assign byp_v3 = s3.valid && (s3.v == e.dst);

  always_comb begin
    du1 = rd_data_u;
    if (byp_u3) du1 = s3.d;
    if (byp_u2) du1 = sum[WW-1:0];
    dv1 = rd_data_v;
    if (byp_v3) dv1 = s3.d;
    if (byp_v2) dv1 = sum[WW-1:0];
  end

  assign bypass = in_valid && (byp_u2 || byp_u3 || byp_v2 || byp_v3);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s2 <= '0;
      s3 <= '0;
    end else begin
      s2.valid <= in_valid;
      s2.v     <= e.dst;
      s2.du    <= du1;
      s2.dv    <= dv1;
      s2.w     <= e.weight;
      s3.valid <= s2_upd;
      s3.v     <= s2.v;
      s3.d     <= sum[WW-1:0];
    end
  end

  // ---- stage 3: memory write ----
  assign wr_en   = s3.valid;
  assign wr_addr = s3.v;
  assign wr_data = s3.d;
  assign busy    = s2.valid || s3.valid;

  // A relaxed distance is always a reachable (finite) one.
  a_finite: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> (wr_data != INF));
endmodule
