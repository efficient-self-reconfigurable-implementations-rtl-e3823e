// tb_self_reconfig_top: end-to-end test of the whole design at its default
// sizes.
//
// The four units are exercised through the top-level ports, concurrently:
//   - string matcher: several patterns, each loaded while the matcher runs
//     (on-chip reconfiguration), text streamed every cycle; occurrences are
//     compared with a brute-force search and the cycle cost with the
//     characters plus the back-edges taken.
//   - shortest path: graphs of the full default size and smaller ones are
//     written, run and read back, compared with a reference Bellman-Ford;
//     the graph memory is then rewritten for the next instance.
//   - GP tree: whole-word loads and single-node rewrites, compared with the
//     program evaluated in the testbench.
//   - interconnect: rewiring and deactivation, compared with a model.
// Each mechanism (pattern reconfiguration, back-edge stall, match, distance
// bypass, multi-pass run, early stop, pass limit, GP word load, GP node
// rewrite, interconnect rewire, inactive interconnect) is counted, and one
// that never happened counts as a failure.
module tb_self_reconfig_top;
  import bf_pkg::*;
  import gp_pkg::*;

  logic clk = 0, rst_n = 0;
  // string matching
  logic kmp_pat_valid = 0, kmp_pat_last = 0, kmp_txt_valid = 0;
  logic [7:0] kmp_pat_char = 0, kmp_txt_char = 0;
  logic kmp_pat_ready, kmp_txt_ready, kmp_running, kmp_match, kmp_backedge;
  logic [31:0] kmp_match_pos;
  logic [2:0] kmp_state;
  // shortest path
  logic bf_edge_we = 0, bf_start = 0, bf_busy, bf_done, bf_bypass;
  eid_t bf_edge_addr = 0;
  edge_t bf_edge_wdata = '0;
  logic [VW:0] bf_num_vertices = 0, bf_passes;
  logic [EW:0] bf_num_edges = 0;
  vid_t bf_source = 0, bf_dist_raddr = 0;
  dist_t bf_dist_rdata;
  // GP
  localparam int NN = 7, NT = 8, GW = 8;
  logic gp_rep_we = 0, gp_node_we = 0;
  logic [NN*FUNC_W-1:0] gp_rep_wdata = 0, gp_rep;
  logic [2:0] gp_node_idx = 0;
  logic [FUNC_W-1:0] gp_node_func = 0;
  logic [NT-1:0][GW-1:0] gp_terms = '0;
  logic [GW-1:0] gp_y_comb, gp_result;
  // interconnect
  localparam int IN = 8, IW = 8, IAW = 3;
  logic ic_cfg_we = 0, ic_cfg_active = 0;
  logic [IAW-1:0] ic_cfg_dst = 0, ic_cfg_src = 0;
  logic [IN-1:0][IW-1:0] ic_lg_out = '0, ic_lg_in;
  logic [IN-1:0][IAW:0] ic_conn;

  int checks = 0, failures = 0;

  self_reconfig_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_reconf = 0, n_backedge = 0, n_match = 0, n_bypass = 0, n_multipass = 0;
  int n_early = 0, n_limit = 0, n_gp_word = 0, n_gp_node = 0, n_ic_rewire = 0, n_ic_off = 0;
  always @(posedge clk) begin
    if (kmp_backedge) n_backedge++;
    if (kmp_match) n_match++;
    if (bf_bypass) n_bypass++;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("%s", msg);
  endtask

  // ---------------- string matching ----------------
  localparam int ML = 6, TL = 400;
  byte pat [ML];
  byte txt [TL];
  bit  got [TL];
  int  m;
  always @(posedge clk) if (kmp_match && kmp_match_pos < TL) got[kmp_match_pos] = 1;

  function automatic int border(int q);
    for (int k = q - 1; k > 0; k--) begin
      automatic bit ok = 1;
      for (int i = 0; i < k; i++) if (pat[i] != pat[q-k+i]) ok = 0;
      if (ok) return k;
    end
    return 0;
  endfunction

  task automatic kmp_run(int p);
    automatic int pi_ref [ML+1];
    automatic int st = 0, exp_bes = 0, cyc = 0;
    m = (p == 0) ? ML : 1 + $urandom_range(ML - 1);
    for (int i = 0; i < m; i++) pat[i] = byte'("a" + $urandom_range(1));
    if (kmp_running) n_reconf++;
    for (int i = 0; i < m; i++) begin
      kmp_pat_valid <= 1; kmp_pat_char <= pat[i]; kmp_pat_last <= (i == m - 1);
      @(posedge clk);
      while (!kmp_pat_ready) @(posedge clk);
    end
    kmp_pat_valid <= 0; kmp_pat_last <= 0;
    @(posedge clk);
    for (int q = 0; q <= m; q++) pi_ref[q] = border(q);
    for (int i = 0; i < TL; i++) begin txt[i] = byte'("a" + $urandom_range(1)); got[i] = 0; end
    for (int i = 0; i < TL; i++)
      forever begin
        if (st == m) begin st = pi_ref[m]; exp_bes++; continue; end
        if (txt[i] == pat[st]) begin st++; break; end
        if (st == 0) break;
        st = pi_ref[st]; exp_bes++;
      end
    for (int i = 0; i < TL; i++) begin
      kmp_txt_valid <= 1; kmp_txt_char <= txt[i];
      @(posedge clk); cyc++;
      while (!kmp_txt_ready) begin @(posedge clk); cyc++; end
    end
    kmp_txt_valid <= 0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < TL; i++) begin
      automatic bit e = (i + 1 >= m);
      if (e) for (int j = 0; j < m; j++) if (txt[i-m+1+j] != pat[j]) e = 0;
      checks++;
      if (e != got[i]) fail($sformatf("kmp pattern %0d pos %0d: got %0d expected %0d", p, i, got[i], e));
    end
    checks++;
    if (cyc != TL + exp_bes) fail($sformatf("kmp pattern %0d: %0d cycles, expected %0d", p, cyc, TL + exp_bes));
  endtask

  // ---------------- shortest path ----------------
  int es [MAX_E], ed [MAX_E], ew [MAX_E];
  longint dref [MAX_V];

  task automatic bf_run(int g);
    automatic int n = (g == 0) ? MAX_V : 3 + $urandom_range(20);
    automatic int e = (g == 0) ? MAX_E : 2 + $urandom_range(3 * n);
    automatic int s = $urandom_range(n - 1);
    automatic int changed, seq_passes = 0, cyc = 0;
    if (e > MAX_E) e = MAX_E;
    for (int i = 0; i < e; i++) begin
      es[i] = $urandom_range(n - 1); ed[i] = $urandom_range(n - 1); ew[i] = $urandom_range(1000);
      if (i < n - 1 && g % 2 == 0) begin es[i] = (s + n - 2 - i) % n; ed[i] = (s + n - 1 - i) % n; ew[i] = 1; end
      bf_edge_we <= 1; bf_edge_addr <= eid_t'(i);
      bf_edge_wdata <= '{src: vid_t'(es[i]), dst: vid_t'(ed[i]), weight: dist_t'(ew[i])};
      @(posedge clk);
    end
    bf_edge_we <= 0;
    for (int v = 0; v < n; v++) dref[v] = (v == s) ? 0 : 64'hFFFF;
    do begin
      changed = 0;
      for (int i = 0; i < e; i++)
        if (dref[es[i]] != 64'hFFFF && dref[es[i]] + ew[i] < dref[ed[i]]) begin
          dref[ed[i]] = dref[es[i]] + ew[i]; changed = 1;
        end
      seq_passes++;
    end while (changed && seq_passes < n - 1);
    bf_num_vertices <= (VW+1)'(n); bf_num_edges <= (EW+1)'(e); bf_source <= vid_t'(s);
    bf_start <= 1;
    @(posedge clk);
    bf_start <= 0;
    do begin @(posedge clk); cyc++; end while (!bf_done);
    if (bf_passes > 1) n_multipass++;
    if (int'(bf_passes) < n - 1) n_early++; else n_limit++;
    checks++;
    if (int'(bf_passes) != seq_passes) fail($sformatf("bf graph %0d: %0d passes expected %0d", g, bf_passes, seq_passes));
    checks++;
    if (cyc < n + seq_passes * (e + 1) || cyc > n + seq_passes * (e + 3))
      fail($sformatf("bf graph %0d: %0d cycles", g, cyc));
    for (int v = 0; v < n; v++) begin
      bf_dist_raddr = vid_t'(v);
      #1;
      checks++;
      if (longint'(bf_dist_rdata) != dref[v])
        fail($sformatf("bf graph %0d vertex %0d: %0d expected %0d", g, v, bf_dist_rdata, dref[v]));
    end
    @(posedge clk);
  endtask

  // ---------------- GP tree ----------------
  logic [NN*FUNC_W-1:0] exp_rep;
  function automatic logic [GW-1:0] ref_f(int f, logic [GW-1:0] x, logic [GW-1:0] z);
    case (f)
      0: return x + z;
      1: return x - z;
      2: return x & z;
      default: return x ^ z;
    endcase
  endfunction
  function automatic logic [GW-1:0] eval(int i);
    automatic int f = int'(exp_rep[i*FUNC_W +: FUNC_W]);
    if (i >= NN / 2) return ref_f(f, gp_terms[2*(i - NN/2)], gp_terms[2*(i - NN/2) + 1]);
    return ref_f(f, eval(2*i + 1), eval(2*i + 2));
  endfunction

  task automatic gp_test();
    exp_rep = '0;
    for (int i = 0; i < 200; i++) begin
      automatic bit whole = (i % 5 == 0);
      automatic int ni = $urandom_range(NN - 1), nf = $urandom_range(NUM_FUNCS - 1);
      automatic logic [NN*FUNC_W-1:0] w = (NN*FUNC_W)'($urandom);
      for (int t = 0; t < NT; t++) gp_terms[t] = GW'($urandom);
      gp_rep_we <= whole; gp_rep_wdata <= w;
      gp_node_we <= !whole; gp_node_idx <= 3'(ni); gp_node_func <= FUNC_W'(nf);
      @(posedge clk);
      gp_rep_we <= 0; gp_node_we <= 0;
      if (whole) begin exp_rep = w; n_gp_word++; end
      else begin exp_rep[ni*FUNC_W +: FUNC_W] = FUNC_W'(nf); n_gp_node++; end
      @(posedge clk);
      #1;
      checks++;
      if (gp_rep != exp_rep || gp_result != eval(0) || gp_y_comb != eval(0))
        fail($sformatf("gp step %0d: result %h expected %h", i, gp_result, eval(0)));
    end
  endtask

  // ---------------- interconnect ----------------
  task automatic ic_test();
    automatic bit act [IN];
    automatic int src [IN];
    for (int i = 0; i < IN; i++) begin act[i] = 0; src[i] = 0; end
    for (int c = 0; c < 500; c++) begin
      automatic int d = $urandom_range(IN - 1), s = $urandom_range(IN - 1);
      automatic bit a = ($urandom_range(3) != 0);
      ic_cfg_we <= 1; ic_cfg_dst <= IAW'(d); ic_cfg_src <= IAW'(s); ic_cfg_active <= a;
      @(posedge clk);
      ic_cfg_we <= 0;
      act[d] = a; src[d] = s;
      if (a) n_ic_rewire++; else n_ic_off++;
      for (int i = 0; i < IN; i++) ic_lg_out[i] = IW'($urandom);
      #1;
      for (int i = 0; i < IN; i++) begin
        checks++;
        if (ic_lg_in[i] != (act[i] ? ic_lg_out[src[i]] : '0))
          fail($sformatf("interconnect logiclet %0d wrong", i));
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      for (int p = 0; p < 8; p++) kmp_run(p);
      for (int g = 0; g < 6; g++) bf_run(g);
      gp_test();
      ic_test();
    join
    $display("reconfigurations %0d back-edges %0d matches %0d bypasses %0d multi-pass %0d early-stop %0d pass-limit %0d gp-word %0d gp-node %0d ic-rewire %0d ic-off %0d",
      n_reconf, n_backedge, n_match, n_bypass, n_multipass, n_early, n_limit, n_gp_word, n_gp_node, n_ic_rewire, n_ic_off);
    checks++; if (n_reconf == 0)    fail("no pattern reconfiguration while running");
    checks++; if (n_backedge == 0)  fail("no back-edge taken");
    checks++; if (n_match == 0)     fail("no match");
    checks++; if (n_bypass == 0)    fail("no distance bypass");
    checks++; if (n_multipass == 0) fail("no multi-pass run");
    checks++; if (n_early == 0)     fail("no early stop");
    checks++; if (n_limit == 0)     fail("no run hit the pass limit");
    checks++; if (n_gp_word == 0)   fail("no GP word load");
    checks++; if (n_gp_node == 0)   fail("no GP node rewrite");
    checks++; if (n_ic_rewire == 0) fail("no interconnect rewire");
    checks++; if (n_ic_off == 0)    fail("no interconnect deactivated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
