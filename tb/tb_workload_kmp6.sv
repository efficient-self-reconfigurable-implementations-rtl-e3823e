// tb_workload_kmp6: the string-matching workload at its evaluated size, a
// pattern of six characters, on the matcher at default parameters.
//
// Several six-character patterns (periodic ones such as "aaaaaa" and
// "ababab", which cause many back-edges, and random ones) are each matched
// against a 20,000-character random text offered every cycle. Every
// occurrence is compared with a brute-force search, and the cycles spent must
// equal the text length plus the back-edges taken, which in turn must be
// fewer than the text length (the KMP bound of less than two cycles per
// character). The measured cycles per character are printed.
module tb_workload_kmp6;
  localparam int M = 6, TL = 20000, NP = 6;
  logic clk = 0, rst_n = 0;
  logic pat_valid = 0, pat_last = 0, txt_valid = 0;
  logic [7:0] pat_char = 0, txt_char = 0;
  logic pat_ready, txt_ready, running, match, backedge;
  logic [31:0] match_pos;
  logic [2:0] state;
  int checks = 0, failures = 0;

  kmp_matcher dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte pat [M];
  byte txt [TL];
  bit  got [TL];
  int  n_got;
  always @(posedge clk) if (match) begin
    n_got++;
    if (match_pos < TL) got[match_pos] = 1;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < NP; p++) begin
      automatic int cyc = 0, bes = 0, n_exp = 0, alpha = (p < 2) ? 2 : 2 + (p % 3);
      for (int i = 0; i < M; i++)
        case (p)
          0: pat[i] = "a";
          1: pat[i] = (i % 2 == 0) ? "a" : "b";
          default: pat[i] = byte'("a" + $urandom_range(alpha - 1));
        endcase
      for (int i = 0; i < M; i++) begin
        pat_valid <= 1; pat_char <= pat[i]; pat_last <= (i == M - 1);
        @(posedge clk);
        while (!pat_ready) @(posedge clk);
      end
      pat_valid <= 0; pat_last <= 0;
      @(posedge clk);
      for (int i = 0; i < TL; i++) begin txt[i] = byte'("a" + $urandom_range(alpha - 1)); got[i] = 0; end
      n_got = 0;
      for (int i = 0; i < TL; i++) begin
        txt_valid <= 1; txt_char <= txt[i];
        @(posedge clk); cyc++; if (backedge) bes++;
        while (!txt_ready) begin @(posedge clk); cyc++; if (backedge) bes++; end
      end
      txt_valid <= 0;
      repeat (2) @(posedge clk);
      for (int i = 0; i < TL; i++) begin
        automatic bit e = (i + 1 >= M);
        if (e) for (int j = 0; j < M; j++) if (txt[i-M+1+j] != pat[j]) e = 0;
        if (e) n_exp++;
        checks++;
        if (e != got[i]) begin
          failures++;
          if (failures < 10) $display("pattern %0d pos %0d: got %0d expected %0d", p, i, got[i], e);
        end
      end
      checks++;
      if (cyc != TL + bes || bes >= TL) begin
        failures++; $display("pattern %0d: %0d cycles with %0d back-edges", p, cyc, bes);
      end
      $display("pattern %s: %0d occurrences, %0d back-edges, %0.3f cycles per character",
        string'({pat[0], pat[1], pat[2], pat[3], pat[4], pat[5]}), n_exp, bes, real'(cyc) / TL);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
