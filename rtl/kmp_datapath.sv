// kmp_datapath: one step of the KMP string-matching automaton.
//
// The current state (number of pattern characters matched so far) is held in
// a flip-flop bank and selects the words of both look-up memories. The
// comparator checks the text character against the pattern character stored
// at that address while, in parallel, the back-edge memory delivers the state
// to fall back to. A multiplexer picks the incremented state on a match and
// the back-edge state otherwise. This structure (state register, increment,
// comparator, multiplexer, two memories on one address bus) follows the
// paper's block diagram.
//
// Text handshake: step is the text character's valid. consume says the
// character is used up in this cycle: on a match, or on a mismatch in state
// 0. On a mismatch in any other state the back-edge is taken and the same
// character must be offered again (consume low), which is how KMP re-examines
// a character; this stall rule is this design's choice of how the automaton
// is sequenced. In state pat_len (whole pattern matched) the comparator is
// forced to "mismatch" so the automaton leaves through back-edge pat_len.
//
// Memory timing: the look-up memories are block RAMs with a registered read.
// mem_raddr presents them the state of the next cycle (0 on reset or clr),
// so in every cycle pat_char and be_state are the words of the current
// state, as if read combinationally from the state register. This use of
// the RAM's own address register is this design's choice.
// Reset (rst_n, active low) is synchronous throughout this design.
// Timing: next_state is combinational from state, the memories and txt_char;
// state updates on the clock edge when step is high. match is a registered
// pulse, high in the cycle after the character that completed the pattern
// was consumed. clr synchronously returns the state to 0.
module kmp_datapath #(
  parameter int unsigned CHAR_W = 8,
  parameter int unsigned SW     = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              step,
  input  logic [CHAR_W-1:0] txt_char,
  input  logic [CHAR_W-1:0] pat_char,   // pattern memory data bus
  input  logic [SW-1:0]     be_state,   // back-edge memory data bus
  input  logic [SW-1:0]     pat_len,
  output logic [SW-1:0]     state,      // current state
  output logic [SW-1:0]     next_state,
  output logic [SW-1:0]     mem_raddr,  // address bus to the block RAMs
  output logic              consume,
  output logic              backedge,
  output logic              match
);
  logic full, eq;
  logic [SW-1:0] inc;

  assign full       = (state == pat_len);
  assign eq         = !full && (txt_char == pat_char);
  assign inc        = state + 1'b1;
  assign next_state = eq ? inc : be_state;
  assign consume    = step && (eq || (state == '0));
  assign backedge   = step && !eq && (state != '0);

  // The block RAMs register their read address, so they are addressed with
  // the state the register is about to take; their data then belongs to
  // the state held in the register.
  always_comb begin
    if (!rst_n || clr) mem_raddr = '0;
    else if (step)     mem_raddr = next_state;
    else               mem_raddr = state;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= '0;
      match <= 1'b0;
    end else if (clr) begin
      state <= '0;
      match <= 1'b0;
    end else begin
      if (step) state <= next_state;
      match <= step && eq && (inc == pat_len);
    end
  end

  // A back-edge always leads to a shorter prefix.
  a_backedge_shorter: assert property (@(posedge clk) disable iff (!rst_n)
    (backedge && !clr) |-> (be_state < state));
endmodule
