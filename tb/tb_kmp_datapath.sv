// tb_kmp_datapath: self-checking test of one KMP automaton step.
//
// The testbench plays both look-up memories (pattern characters and
// back-edges, the latter computed here by direct prefix/suffix comparison)
// as memories with a registered read addressed by mem_raddr, and offers
// random text characters, sometimes with gaps. Every cycle it checks
// next_state, consume and backedge against a reference model of the
// automaton, and checks that match pulses exactly one cycle after the final
// pattern character is consumed.
module tb_kmp_datapath;
  localparam int SW = 3;
  localparam int MAXL = 7;

  logic clk = 0, rst_n = 0, clr = 0, step = 0;
  logic [7:0] txt_char = 0, pat_char;
  logic [SW-1:0] be_state, pat_len, state, next_state, mem_raddr;
  logic consume, backedge, match;
  int checks = 0, failures = 0;

  kmp_datapath #(.CHAR_W(8), .SW(SW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte pat [MAXL+1];
  int  pi_ref [MAXL+1];
  int  m, ref_state;
  bit  exp_match_next;
  int  n_back = 0, n_match = 0;

  function automatic int border(int q);
    for (int k = q - 1; k > 0; k--) begin
      automatic bit ok = 1;
      for (int i = 0; i < k; i++) if (pat[i] != pat[q-k+i]) ok = 0;
      if (ok) return k;
    end
    return 0;
  endfunction

  // memory models: registered read at mem_raddr
  always @(posedge clk) begin
    pat_char <= pat[mem_raddr];
    be_state <= SW'(pi_ref[mem_raddr]);
  end
  assign pat_len  = SW'(m);

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < 30; p++) begin
      m = 1 + $urandom_range(5);
      for (int i = 0; i < m; i++) pat[i] = byte'("a" + $urandom_range(1));
      pat[m] = 8'h00;
      for (int q = 0; q <= m; q++) pi_ref[q] = border(q);
      clr <= 1; step <= 0;
      @(posedge clk);
      clr <= 0;
      ref_state = 0; exp_match_next = 0;
      for (int c = 0; c < 200; c++) begin
        automatic bit    s  = ($urandom_range(3) != 0);
        automatic byte   ch = byte'("a" + $urandom_range(1));
        automatic bit    eq;
        automatic int    nxt;
        step <= s; txt_char <= ch;
        #1;
        eq  = (ref_state != m) && (ch == pat[ref_state]);
        nxt = eq ? ref_state + 1 : pi_ref[ref_state];
        checks++;
        if (state != SW'(ref_state) || next_state != SW'(nxt) ||
            consume != (s && (eq || ref_state == 0)) ||
            backedge != (s && !eq && ref_state != 0) || match != exp_match_next) begin
          failures++;
          if (failures < 10) $display("p%0d c%0d: state %0d/%0d next %0d/%0d cons %0d back %0d match %0d/%0d",
            p, c, state, ref_state, next_state, nxt, consume, backedge, match, exp_match_next);
        end
        if (backedge) n_back++;
        if (match) n_match++;
        @(posedge clk);
        exp_match_next = s && eq && (nxt == m);
        if (s) ref_state = nxt;
      end
    end
    checks++;
    if (n_back == 0 || n_match == 0) begin failures++; $display("no back-edge or no match seen"); end
    $display("back-edges %0d matches %0d", n_back, n_match);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
