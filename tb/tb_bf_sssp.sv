// tb_bf_sssp: self-checking test of the Bellman-Ford shortest-path unit.
//
// Random directed graphs (including unreachable vertices, parallel edges and
// edge orders that need several passes) are written into the graph memory,
// a run is started, and the resulting distances are compared with a
// reference computed in the testbench by relaxing until nothing changes.
// The number of passes must equal that of a sequential Bellman-Ford over the
// same edge order with the same stopping rule, which holds only if the
// pipeline forwards distances correctly, and the run time must be
// num_vertices + passes * (num_edges + drain) cycles with a drain of 1..3.
// The test also requires that the bypass was used.
module tb_bf_sssp;
  import bf_pkg::*;

  logic clk = 0, rst_n = 0;
  logic edge_we = 0, start = 0;
  eid_t edge_addr = 0;
  edge_t edge_wdata = '0;
  logic [VW:0] num_vertices = 0, passes;
  logic [EW:0] num_edges = 0;
  vid_t source = 0, dist_raddr = 0;
  logic busy, done, bypass;
  dist_t dist_rdata;
  int checks = 0, failures = 0;

  bf_sssp dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_bypass = 0;
  always @(posedge clk) if (bypass) n_bypass++;

  int es [MAX_E], ed [MAX_E], ew [MAX_E];
  longint dref [MAX_V];
  longint dseq [MAX_V];

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int g = 0; g < 12; g++) begin
      automatic int n = (g == 11) ? MAX_V : 2 + $urandom_range(30);
      automatic int e = (g == 11) ? MAX_E : 1 + $urandom_range(4 * n);
      automatic int s = $urandom_range(n - 1);
      automatic int exp_passes = 0, cyc = 0, changed;
      if (e > MAX_E) e = MAX_E;
      for (int i = 0; i < e; i++) begin
        es[i] = $urandom_range(n - 1);
        ed[i] = $urandom_range(n - 1);
        ew[i] = $urandom_range(200);
        // a chain in reverse edge order forces many passes
        if (i < n - 1 && g % 3 == 0) begin es[i] = (s + n - 2 - i) % n; ed[i] = (s + n - 1 - i) % n; end
        edge_we <= 1; edge_addr <= eid_t'(i);
        edge_wdata <= '{src: vid_t'(es[i]), dst: vid_t'(ed[i]), weight: dist_t'(ew[i])};
        @(posedge clk);
      end
      edge_we <= 0;
      // references
      for (int v = 0; v < n; v++) begin dref[v] = (v == s) ? 0 : 64'hFFFF; dseq[v] = dref[v]; end
      do begin
        changed = 0;
        for (int i = 0; i < e; i++)
          if (dref[es[i]] != 64'hFFFF && dref[es[i]] + ew[i] < dref[ed[i]]) begin
            dref[ed[i]] = dref[es[i]] + ew[i]; changed = 1;
          end
      end while (changed);
      do begin
        changed = 0;
        for (int i = 0; i < e; i++)
          if (dseq[es[i]] != 64'hFFFF && dseq[es[i]] + ew[i] < dseq[ed[i]]) begin
            dseq[ed[i]] = dseq[es[i]] + ew[i]; changed = 1;
          end
        exp_passes++;
      end while (changed && exp_passes < n - 1);
      // run
      num_vertices <= (VW+1)'(n); num_edges <= (EW+1)'(e); source <= vid_t'(s);
      start <= 1;
      @(posedge clk);
      start <= 0;
      do begin @(posedge clk); cyc++; end while (!done);
      for (int v = 0; v < n; v++) begin
        dist_raddr = vid_t'(v);
        #1;
        checks++;
        if (longint'(dist_rdata) != dref[v]) begin
          failures++;
          if (failures < 10) $display("graph %0d vertex %0d: %0d expected %0d", g, v, dist_rdata, dref[v]);
        end
      end
      checks++;
      if (int'(passes) != exp_passes) begin
        failures++; $display("graph %0d: %0d passes, expected %0d", g, passes, exp_passes);
      end
      checks++;
      if (cyc < n + exp_passes * (e + 1) || cyc > n + exp_passes * (e + 3)) begin
        failures++; $display("graph %0d: %0d cycles for n=%0d e=%0d passes=%0d", g, cyc, n, e, exp_passes);
      end
      @(posedge clk);
    end
    checks++;
    if (n_bypass == 0) begin failures++; $display("bypass never used"); end
    $display("bypass used %0d times", n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
