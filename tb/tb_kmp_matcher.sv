// tb_kmp_matcher: self-checking test of the self-reconfigurable KMP matcher.
//
// For a series of random patterns (1..MAX_LEN characters over a two- or
// three-letter alphabet, so that back-edges are frequent) the testbench loads
// the pattern, streams a random text and compares every reported occurrence
// (match_pos) with a brute-force search done in the testbench. It also checks
// the cycle cost: with the text offered every cycle, each character costs one
// cycle plus one per back-edge, and the number of back-edges must equal that
// of a reference KMP automaton whose failure function is computed here by
// direct prefix/suffix comparison. Each new pattern is loaded while the
// matcher is running, which exercises reconfiguration.
module tb_kmp_matcher;
  localparam int MAX_LEN = 6;
  localparam int TXT_LEN = 300;
  localparam int N_PAT   = 40;

  logic clk = 0, rst_n = 0;
  logic pat_valid = 0, pat_last = 0, txt_valid = 0;
  logic [7:0] pat_char = 0, txt_char = 0;
  logic pat_ready, txt_ready, running, match, backedge;
  logic [31:0] match_pos;
  logic [2:0] state;
  int checks = 0, failures = 0;

  kmp_matcher #(.MAX_LEN(MAX_LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte pat [MAX_LEN];
  byte txt [TXT_LEN];
  int  m;
  int  pi_ref [MAX_LEN+1];
  bit  exp_match [TXT_LEN];
  bit  got_match [TXT_LEN];
  int  got_count;

  // longest proper prefix of pat[0..q-1] that is also its suffix
  function automatic int border(int q);
    for (int k = q - 1; k > 0; k--) begin
      automatic bit ok = 1;
      for (int i = 0; i < k; i++) if (pat[i] != pat[q-k+i]) ok = 0;
      if (ok) return k;
    end
    return 0;
  endfunction

  always @(posedge clk) begin
    if (match) begin
      if (match_pos < TXT_LEN) got_match[match_pos] = 1;
      got_count++;
    end
  end

  int cyc, bes, exp_bes, st, consumed;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < N_PAT; p++) begin
      automatic int alpha = (p % 2 == 0) ? 2 : 3;
      m = 1 + $urandom_range(MAX_LEN - 1);
      for (int i = 0; i < m; i++) pat[i] = byte'("a" + $urandom_range(alpha - 1));
      for (int q = 0; q <= m; q++) pi_ref[q] = border(q);
      // load pattern
      for (int i = 0; i < m; i++) begin
        pat_valid <= 1; pat_char <= pat[i]; pat_last <= (i == m - 1);
        @(posedge clk);
        while (!pat_ready) @(posedge clk);
      end
      pat_valid <= 0; pat_last <= 0;
      @(posedge clk);
      checks++;
      if (!running) begin failures++; $display("not running after load"); end
      // reference
      for (int i = 0; i < TXT_LEN; i++) begin
        txt[i] = byte'("a" + $urandom_range(alpha - 1));
        got_match[i] = 0;
      end
      for (int i = 0; i < TXT_LEN; i++) begin
        automatic bit ok = (i + 1 >= m);
        if (ok) for (int j = 0; j < m; j++) if (txt[i-m+1+j] != pat[j]) ok = 0;
        exp_match[i] = ok;
      end
      exp_bes = 0; st = 0;
      for (int i = 0; i < TXT_LEN; i++) begin
        forever begin
          if (st == m) begin st = pi_ref[m]; exp_bes++; continue; end
          if (txt[i] == pat[st]) begin st++; break; end
          if (st == 0) break;
          st = pi_ref[st]; exp_bes++;
        end
      end
      // stream text, one offer every cycle
      got_count = 0; cyc = 0; bes = 0; consumed = 0;
      for (int i = 0; i < TXT_LEN; i++) begin
        txt_valid <= 1; txt_char <= txt[i];
        @(posedge clk); cyc++;
        if (backedge) bes++;
        while (!txt_ready) begin @(posedge clk); cyc++; if (backedge) bes++; end
        consumed++;
      end
      txt_valid <= 0;
      repeat (3) @(posedge clk);
      for (int i = 0; i < TXT_LEN; i++) begin
        checks++;
        if (exp_match[i] != got_match[i]) begin
          failures++;
          if (failures < 10) $display("pattern %0d pos %0d: expected %0d got %0d", p, i, exp_match[i], got_match[i]);
        end
      end
      checks++;
      if (bes != exp_bes || cyc != TXT_LEN + exp_bes) begin
        failures++;
        $display("pattern %0d: cycles %0d back-edges %0d, expected %0d and %0d", p, cyc, bes, TXT_LEN + exp_bes, exp_bes);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
