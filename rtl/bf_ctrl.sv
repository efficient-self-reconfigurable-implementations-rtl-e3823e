// bf_ctrl: control circuit of the Bellman-Ford shortest-path unit.
//
// After start it initialises the data memory (distance 0 for the source
// vertex, infinity for the others, one vertex per cycle), then feeds the edge
// numbers 0 .. num_edges-1 into the relaxation pipeline, one per cycle, pass
// after pass. After each pass it waits for the pipeline to drain. It stops
// when a pass changed no distance or when num_vertices-1 passes are done,
// the Bellman-Ford bound; a run thus takes O(n*e) cycles.
// The paper leaves this circuit out of its figure and gives only the
// algorithm; the sequencing, the early stop and the drain are this design's
// choices.
//
// Interface: num_vertices, num_edges and source are sampled at start and must
// be at least 1. busy is high from the cycle after start until done pulses.
// passes counts completed passes of the current run.
module bf_ctrl
  import bf_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [VW:0]         num_vertices,
  input  logic [EW:0]         num_edges,
  input  vid_t                source,
  // data memory initialisation write
  output logic                init_we,
  output vid_t                init_addr,
  output dist_t               init_data,
  // edge issue into the pipeline
  output logic                issue_valid,
  output eid_t                issue_edge,
  input  logic                pipe_busy,
  input  logic                pipe_wr,
  output logic                busy,
  output logic                done,
  output logic [VW:0]         passes
);
  typedef enum logic [2:0] {C_IDLE, C_INIT, C_PASS, C_DRAIN, C_DONE} cstate_e;
  cstate_e     st;
  logic [VW:0] n_q, vcnt;
  logic [EW:0] e_q, ecnt;
  vid_t        src_q;
  logic        changed;

  assign busy        = (st != C_IDLE) && (st != C_DONE);
  assign init_we     = (st == C_INIT);
  assign init_addr   = vid_t'(vcnt);
  assign init_data   = (vid_t'(vcnt) == src_q) ? '0 : INF;
  assign issue_valid = (st == C_PASS);
  assign issue_edge  = eid_t'(ecnt);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st      <= C_IDLE;
      done    <= 1'b0;
      n_q     <= '0;
      e_q     <= '0;
      src_q   <= '0;
      vcnt    <= '0;
      ecnt    <= '0;
      passes  <= '0;
      changed <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        C_IDLE, C_DONE: if (start) begin
          n_q    <= num_vertices;
          e_q    <= num_edges;
          src_q  <= source;
          vcnt   <= '0;
          passes <= '0;
          st     <= C_INIT;
        end
        C_INIT: begin
          vcnt <= vcnt + 1'b1;
          if (vcnt + 1'b1 == n_q) begin
            ecnt    <= '0;
            changed <= 1'b0;
            if (n_q <= 1 || e_q == '0) begin
              st   <= C_DONE;
              done <= 1'b1;
            end else begin
              st <= C_PASS;
            end
          end
        end
        C_PASS: begin
          if (pipe_wr) changed <= 1'b1;
          ecnt <= ecnt + 1'b1;
          if (ecnt + 1'b1 == e_q) st <= C_DRAIN;
        end
        C_DRAIN: begin
          if (pipe_wr) changed <= 1'b1;
          if (!pipe_busy) begin
            passes  <= passes + 1'b1;
            ecnt    <= '0;
            changed <= 1'b0;
            if (!changed || passes + 1'b1 == n_q - 1'b1) begin
              st   <= C_DONE;
              done <= 1'b1;
            end else begin
              st <= C_PASS;
            end
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
