// kmp_ctrl: control circuit of the self-reconfigurable KMP string matcher.
//
// It performs the pre-processing phase on chip: the pattern arrives one
// character at a time, is written into the pattern-character memory, and the
// pattern-specific back-edges are written into the back-edge memory. No
// configuration bit-stream is touched; reconfiguring for a new pattern is just
// a sequence of memory writes.
//
// How the back-edges are built is this design's choice: the pattern is run
// through the automaton itself. While character P[q] (q >= 1) is being loaded
// it is also fed to the datapath as if it were text; when the datapath
// consumes it, the state it moves to is the length of the longest proper
// prefix of P that is also a suffix of P[0..q], which is exactly back-edge
// q+1. The automaton only ever reads back-edges of states <= q at that point,
// all of which are already written. Back-edges 0 and 1 are 0.
//
// Phases: IDLE -> INIT (write back-edge 0, clear state) -> LOAD (accept pattern
// characters with pat_valid/pat_ready, last one marked by pat_last or by
// reaching MAX_LEN) -> RUN (text characters with txt_valid/txt_ready). A
// pat_valid seen in RUN starts reconfiguration for a new pattern.
// Outputs match (one-cycle pulse, passed on from the datapath) and match_pos, the index in the text
// stream of the last character of the occurrence; the text index restarts at
// 0 after every new pattern.
module kmp_ctrl #(
  parameter int unsigned CHAR_W  = 8,
  parameter int unsigned MAX_LEN = 6,
  parameter int unsigned SW      = $clog2(MAX_LEN + 1),
  parameter int unsigned POS_W   = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // pattern load stream
  input  logic              pat_valid,
  input  logic [CHAR_W-1:0] pat_char,
  input  logic              pat_last,
  output logic              pat_ready,
  // text stream
  input  logic              txt_valid,
  input  logic [CHAR_W-1:0] txt_char,
  output logic              txt_ready,
  // results
  output logic              running,
  output logic              match,
  output logic [POS_W-1:0]  match_pos,
  // pattern memory write port
  output logic              pm_we,
  output logic [SW-1:0]     pm_waddr,
  output logic [CHAR_W-1:0] pm_wdata,
  // back-edge memory write port
  output logic              bm_we,
  output logic [SW-1:0]     bm_waddr,
  output logic [SW-1:0]     bm_wdata,
  // datapath control
  output logic              dp_clr,
  output logic              dp_step,
  output logic [CHAR_W-1:0] dp_char,
  output logic [SW-1:0]     dp_len,
  input  logic [SW-1:0]     dp_next,
  input  logic              dp_consume,
  input  logic              dp_match
);
  typedef enum logic [1:0] {S_IDLE, S_INIT, S_LOAD, S_RUN} phase_e;
  phase_e phase;
  logic [SW-1:0]    q;        // characters of the pattern loaded so far
  logic [POS_W-1:0] pos;      // text characters consumed so far
  logic             accept, last;

  assign running = (phase == S_RUN);
  assign dp_len  = q;

  always_comb begin
    dp_step   = 1'b0;
    dp_char   = txt_char;
    pat_ready = 1'b0;
    txt_ready = 1'b0;
    pm_we     = 1'b0;
    pm_waddr  = q;
    pm_wdata  = pat_char;
    bm_we     = 1'b0;
    bm_waddr  = '0;
    bm_wdata  = '0;
    dp_clr    = 1'b0;
    accept    = 1'b0;
    unique case (phase)
      S_IDLE: ;
      S_INIT: begin
        bm_we  = 1'b1;             // back-edge 0 -> state 0
        dp_clr = 1'b1;
      end
      S_LOAD: begin
        if (q == '0) begin
          pat_ready = 1'b1;
          accept    = pat_valid;
          bm_we     = pat_valid;   // back-edge 1 -> state 0
          bm_waddr  = SW'(1);
        end else begin
          dp_step   = pat_valid;
          dp_char   = pat_char;
          pat_ready = dp_consume;
          accept    = pat_valid && dp_consume;
          bm_we     = accept;      // back-edge q+1 = state after P[q]
          bm_waddr  = q + 1'b1;
          bm_wdata  = dp_next;
        end
        pm_we  = accept;
        dp_clr = accept && last;   // start matching from state 0
      end
      S_RUN: begin
        dp_step   = txt_valid && !pat_valid;
        txt_ready = dp_consume && !pat_valid;
      end
      default: ;
    endcase
  end

  assign last = pat_last || (32'(q) + 1 == MAX_LEN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= S_IDLE;
      q     <= '0;
      pos   <= '0;
    end else begin
      unique case (phase)
        S_IDLE: if (pat_valid) phase <= S_INIT;
        S_INIT: begin
          q     <= '0;
          phase <= S_LOAD;
        end
        S_LOAD: if (accept) begin
          q <= q + 1'b1;
          if (last) begin
            phase <= S_RUN;
            pos   <= '0;
          end
        end
        S_RUN: begin
          if (pat_valid) phase <= S_INIT;
          else if (dp_consume) pos <= pos + 1'b1;
        end
        default: phase <= S_IDLE;
      endcase
    end
  end

  // dp_match is already a registered pulse; pos has counted the character
  // that completed the occurrence by the time it is seen.
  assign match     = (phase == S_RUN) && dp_match;
  assign match_pos = pos - 1'b1;
endmodule
