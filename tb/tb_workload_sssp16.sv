// tb_workload_sssp16: the shortest-path workload with 16-bit edge weights on
// the unit at default parameters (64 vertices, 256 edges).
//
// Full-size random graphs are run with weights over the whole 16-bit range,
// with small weights only, and with a mix, so that some paths exceed the
// 16-bit distance range and must be left unreached, as in the reference.
// Distances are compared with a reference Bellman-Ford; the run time must
// be n + passes * (e + 1..3) cycles, one edge relaxed per cycle.
module tb_workload_sssp16;
  import bf_pkg::*;
  logic clk = 0, rst_n = 0, edge_we = 0, start = 0;
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
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int es [MAX_E], ed [MAX_E], ew [MAX_E];
  longint dref [MAX_V];

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int g = 0; g < 9; g++) begin
      automatic int n = MAX_V, e = MAX_E, s = $urandom_range(MAX_V - 1);
      automatic int changed, seq_passes = 0, cyc = 0, unreached = 0;
      for (int i = 0; i < e; i++) begin
        es[i] = $urandom_range(n - 1); ed[i] = $urandom_range(n - 1);
        case (g % 3)
          0: ew[i] = $urandom_range(65535);
          1: ew[i] = $urandom_range(255);
          default: ew[i] = ($urandom_range(1) == 1) ? $urandom_range(65535) : $urandom_range(4000);
        endcase
        edge_we <= 1; edge_addr <= eid_t'(i);
        edge_wdata <= '{src: vid_t'(es[i]), dst: vid_t'(ed[i]), weight: dist_t'(ew[i])};
        @(posedge clk);
      end
      edge_we <= 0;
      for (int v = 0; v < n; v++) dref[v] = (v == s) ? 0 : 65535;
      do begin
        changed = 0;
        for (int i = 0; i < e; i++)
          if (dref[es[i]] != 65535 && dref[es[i]] + ew[i] < dref[ed[i]]) begin
            dref[ed[i]] = dref[es[i]] + ew[i]; changed = 1;
          end
        seq_passes++;
      end while (changed && seq_passes < n - 1);
      num_vertices <= (VW+1)'(n); num_edges <= (EW+1)'(e); source <= vid_t'(s);
      start <= 1;
      @(posedge clk);
      start <= 0;
      do begin @(posedge clk); cyc++; end while (!done);
      for (int v = 0; v < n; v++) begin
        dist_raddr = vid_t'(v);
        #1;
        if (dref[v] == 65535) unreached++;
        checks++;
        if (longint'(dist_rdata) != dref[v]) begin
          failures++;
          if (failures < 10) $display("graph %0d vertex %0d: %0d expected %0d", g, v, dist_rdata, dref[v]);
        end
      end
      checks++;
      if (int'(passes) != seq_passes || cyc < n + seq_passes * (e + 1) || cyc > n + seq_passes * (e + 3)) begin
        failures++; $display("graph %0d: %0d passes (expected %0d), %0d cycles", g, passes, seq_passes, cyc);
      end
      $display("graph %0d: %0d passes, %0d cycles, %0d of %0d vertices unreached", g, passes, cyc, unreached, n);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
