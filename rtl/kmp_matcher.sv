// kmp_matcher: self-reconfigurable KMP string matcher.
//
// The finite automaton of the Knuth-Morris-Pratt algorithm is built from fixed
// logic (kmp_datapath: state register, comparator, increment, multiplexer)
// and two look-up memories (block RAMs, bram_sdp) addressed by the automaton
// state: the pattern
// character of each state and the back-edge (failure transition) of each
// state. Adapting the matcher to a new pattern therefore only rewrites memory
// words, which kmp_ctrl does on chip while the pattern is loaded. Only one
// comparator is needed whatever the pattern length, and the look-up of the
// back-edge happens in parallel with the comparison.
//
// Interface: load a pattern of 1..MAX_LEN characters with pat_valid /
// pat_ready / pat_char, pat_last on the final one. Then stream text with
// txt_valid / txt_ready / txt_char. match pulses for one cycle, one cycle
// after the character that completes an occurrence was accepted, with
// match_pos the index (from 0) of that character in the text stream.
// Throughput: one text character per cycle, plus one stall cycle for every
// back-edge taken (at most one per character on average over a text, as in
// KMP). Loading a pattern of M characters takes 2 + M cycles plus the
// back-edges taken while building the table.
//
// MAX_LEN defaults to 6, the pattern size the paper reports; the 8-bit
// character width is this design's choice.
module kmp_matcher #(
  parameter int unsigned CHAR_W  = 8,
  parameter int unsigned MAX_LEN = 6,
  parameter int unsigned POS_W   = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pat_valid,
  input  logic [CHAR_W-1:0] pat_char,
  input  logic              pat_last,
  output logic              pat_ready,
  input  logic              txt_valid,
  input  logic [CHAR_W-1:0] txt_char,
  output logic              txt_ready,
  output logic              running,
  output logic              match,
  output logic [POS_W-1:0]  match_pos,
  output logic              backedge,  // a back-edge was taken this cycle
  output logic [$clog2(MAX_LEN+1)-1:0] state  // automaton state
);
  localparam int unsigned SW = $clog2(MAX_LEN + 1);

  logic              pm_we, bm_we;
  logic [SW-1:0]     pm_waddr, bm_waddr, bm_wdata;
  logic [CHAR_W-1:0] pm_wdata, pm_rdata;
  logic [SW-1:0]     mem_raddr, be_rdata, dp_next, dp_len;
  logic              dp_clr, dp_step, dp_consume, dp_match;
  logic [CHAR_W-1:0] dp_char;

  bram_sdp #(.WIDTH(CHAR_W), .DEPTH(MAX_LEN + 1), .AW(SW)) u_pattern_mem (
    .clk, .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata),
    .raddr(mem_raddr), .rdata(pm_rdata));

  bram_sdp #(.WIDTH(SW), .DEPTH(MAX_LEN + 1), .AW(SW)) u_backedge_mem (
    .clk, .we(bm_we), .waddr(bm_waddr), .wdata(bm_wdata),
    .raddr(mem_raddr), .rdata(be_rdata));

  kmp_datapath #(.CHAR_W(CHAR_W), .SW(SW)) u_datapath (
    .clk, .rst_n, .clr(dp_clr), .step(dp_step), .txt_char(dp_char),
    .pat_char(pm_rdata), .be_state(be_rdata), .pat_len(dp_len),
    .state, .next_state(dp_next), .mem_raddr, .consume(dp_consume), .backedge,
    .match(dp_match));

  kmp_ctrl #(.CHAR_W(CHAR_W), .MAX_LEN(MAX_LEN), .SW(SW), .POS_W(POS_W)) u_ctrl (
    .clk, .rst_n, .pat_valid, .pat_char, .pat_last, .pat_ready,
    .txt_valid, .txt_char, .txt_ready, .running, .match, .match_pos,
    .pm_we, .pm_waddr, .pm_wdata, .bm_we, .bm_waddr, .bm_wdata,
    .dp_clr, .dp_step, .dp_char, .dp_len, .dp_next,
    .dp_consume, .dp_match);
endmodule
