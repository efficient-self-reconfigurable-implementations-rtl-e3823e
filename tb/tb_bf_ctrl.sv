// tb_bf_ctrl: self-checking test of the Bellman-Ford control circuit.
//
// The pipeline is replaced by a model: busy follows the issued edges through
// two stages, and a write (pipe_wr) is reported for the first K passes only,
// K chosen at random per run. The testbench checks the initialisation writes
// (one per vertex, 0 at the source and infinity elsewhere), that every pass
// issues edge numbers 0..num_edges-1 in order, one per cycle, that the run
// ends after min(K+1, num_vertices-1) passes with a single done pulse, and
// the degenerate runs (one vertex) that end right after initialisation.
module tb_bf_ctrl;
  import bf_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [VW:0] num_vertices = 0, passes;
  logic [EW:0] num_edges = 0;
  vid_t source = 0, init_addr;
  dist_t init_data;
  logic init_we, issue_valid, pipe_busy, pipe_wr, busy, done;
  eid_t issue_edge;
  int checks = 0, failures = 0;

  bf_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pipeline model
  // (an edge of pass p < K writes at random; the last edge of such a pass
  // always writes, so every one of those passes changes something)
  logic s2 = 0, s3 = 0, s2_last = 0;
  int   s2_pass = 0, cur_pass = 0, k_changes = 0;
  assign pipe_busy = s2 || s3;
  always @(posedge clk) begin
    if (start) cur_pass <= 0;
    else if (issue_valid && 32'(issue_edge) + 1 == 32'(num_edges)) cur_pass <= cur_pass + 1;
    s2      <= issue_valid;
    s2_pass <= cur_pass;
    s2_last <= (32'(issue_edge) + 1 == 32'(num_edges));
    s3      <= s2 && (s2_pass < k_changes) && ($urandom_range(3) == 0 || s2_last);
  end
  assign pipe_wr = s3;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int r = 0; r < 40; r++) begin
      automatic int n = (r % 8 == 7) ? 1 : 2 + $urandom_range(MAX_V - 2);
      automatic int e = 1 + $urandom_range(40);
      automatic int s = $urandom_range(n - 1);
      automatic int exp_passes, n_init = 0, n_done = 0, next_edge = 0, issued = 0;
      automatic bit order_ok = 1, init_ok = 1;
      k_changes = $urandom_range(n);
      exp_passes = (n <= 1) ? 0 : ((k_changes + 1 < n - 1) ? k_changes + 1 : n - 1);
      num_vertices <= (VW+1)'(n); num_edges <= (EW+1)'(e); source <= vid_t'(s);
      start <= 1;
      @(posedge clk);
      start <= 0;
      while (n_done == 0) begin
        @(posedge clk);
        if (init_we) begin
          if (int'(init_addr) != n_init || init_data != ((n_init == s) ? 16'd0 : INF)) init_ok = 0;
          n_init++;
        end
        if (issue_valid) begin
          if (int'(issue_edge) != next_edge) order_ok = 0;
          issued++;
          next_edge = (next_edge + 1 == e) ? 0 : next_edge + 1;
        end
        if (done) n_done++;
      end
      repeat (3) begin @(posedge clk); if (done) n_done++; end
      checks++;
      if (!init_ok || n_init != n) begin failures++; $display("run %0d: init writes wrong (%0d)", r, n_init); end
      checks++;
      if (!order_ok) begin failures++; $display("run %0d: edge order wrong", r); end
      checks++;
      if (int'(passes) != exp_passes || issued != exp_passes * e) begin
        failures++; $display("run %0d: passes %0d issued %0d, expected %0d passes of %0d (n=%0d K=%0d)",
          r, passes, issued, exp_passes, e, n, k_changes);
      end
      checks++;
      if (n_done != 1 || busy) begin failures++; $display("run %0d: done pulses %0d busy %0d", r, n_done, busy); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
