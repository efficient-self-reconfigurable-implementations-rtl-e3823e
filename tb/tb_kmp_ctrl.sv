// tb_kmp_ctrl: self-checking test of the KMP control circuit.
//
// The controller is connected to a real datapath and to the two look-up
// memories, as in the matcher. The testbench watches the memory write ports:
// after a pattern is loaded, the pattern memory must hold the pattern and the
// back-edge memory must hold, for every state q in 0..M, the length of the
// longest proper prefix of the pattern that is also a suffix of its first q
// characters (computed here by direct comparison). It also checks the phase
// sequence (running only after the last character), that text is refused
// while a pattern is loaded, that the pattern length stops at MAX_LEN, and
// the load time of 2 + M cycles plus the back-edges taken.
module tb_kmp_ctrl;
  localparam int MAX_LEN = 6;
  localparam int SW = 3;

  logic clk = 0, rst_n = 0;
  logic pat_valid = 0, pat_last = 0, txt_valid = 0;
  logic [7:0] pat_char = 0, txt_char = 0;
  logic pat_ready, txt_ready, running, match;
  logic [31:0] match_pos;
  logic pm_we, bm_we, dp_clr, dp_step, dp_consume, dp_match, backedge;
  logic [SW-1:0] pm_waddr, bm_waddr, bm_wdata, dp_len, dp_next, state, mem_raddr, be_rdata;
  logic [7:0] pm_wdata, dp_char, pm_rdata;
  int checks = 0, failures = 0;

  kmp_ctrl #(.MAX_LEN(MAX_LEN)) dut (.*);
  bram_sdp #(.WIDTH(8), .DEPTH(MAX_LEN+1), .AW(SW)) u_pm (
    .clk, .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata), .raddr(mem_raddr), .rdata(pm_rdata));
  bram_sdp #(.WIDTH(SW), .DEPTH(MAX_LEN+1), .AW(SW)) u_bm (
    .clk, .we(bm_we), .waddr(bm_waddr), .wdata(bm_wdata), .raddr(mem_raddr), .rdata(be_rdata));
  kmp_datapath #(.CHAR_W(8), .SW(SW)) u_dp (
    .clk, .rst_n, .clr(dp_clr), .step(dp_step), .txt_char(dp_char), .pat_char(pm_rdata),
    .be_state(be_rdata), .pat_len(dp_len), .state, .next_state(dp_next), .mem_raddr,
    .consume(dp_consume), .backedge, .match(dp_match));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte pat [MAX_LEN+2];
  int  shadow_be [MAX_LEN+1];
  byte shadow_p [MAX_LEN+1];
  int  m, m_eff, cyc, bes;

  function automatic int border(int q);
    for (int k = q - 1; k > 0; k--) begin
      automatic bit ok = 1;
      for (int i = 0; i < k; i++) if (pat[i] != pat[q-k+i]) ok = 0;
      if (ok) return k;
    end
    return 0;
  endfunction

  always @(posedge clk) begin
    if (bm_we) shadow_be[bm_waddr] <= int'(bm_wdata);
    if (pm_we) shadow_p[pm_waddr]  <= pm_wdata;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int p = 0; p < 60; p++) begin
      // every 10th pattern is sent without pat_last and longer than MAX_LEN
      m = (p % 10 == 9) ? MAX_LEN + 2 : 1 + $urandom_range(MAX_LEN - 1);
      m_eff = (m > MAX_LEN) ? MAX_LEN : m;
      for (int i = 0; i < m; i++) pat[i] = byte'("a" + $urandom_range(1));
      for (int q = 0; q <= MAX_LEN; q++) shadow_be[q] = -1;
      cyc = 0; bes = 0;
      txt_valid <= 1; txt_char <= "a";   // text offered during load must be refused
      for (int i = 0; i < m_eff; i++) begin
        pat_valid <= 1; pat_char <= pat[i]; pat_last <= (i == m - 1);
        @(posedge clk); cyc++;
        if (txt_ready) begin failures++; $display("text accepted during load"); end
        if (backedge) bes++;
        while (!pat_ready) begin
          @(posedge clk); cyc++;
          if (backedge) bes++;
          if (txt_ready) begin failures++; $display("text accepted during load"); end
        end
      end
      pat_valid <= 0; pat_last <= 0; txt_valid <= 0;
      @(posedge clk); cyc++;
      checks++;
      if (!running) begin failures++; $display("p%0d: not running after load", p); end
      // load cost: request-detection and INIT cycles, one per character, one
      // per back-edge; plus the idle cycle counted after the load
      checks++;
      if (cyc != 2 + m_eff + bes + 1) begin
        failures++; $display("p%0d: load took %0d cycles, %0d back-edges, length %0d", p, cyc, bes, m_eff);
      end
      for (int q = 0; q <= m_eff; q++) begin
        checks++;
        if (shadow_be[q] != border(q)) begin
          failures++;
          if (failures < 10) $display("p%0d: back-edge %0d = %0d, expected %0d", p, q, shadow_be[q], border(q));
        end
      end
      for (int i = 0; i < m_eff; i++) begin
        checks++;
        if (shadow_p[i] != pat[i]) begin failures++; $display("p%0d: pattern char %0d wrong", p, i); end
      end
      checks++;
      if (dp_len != SW'(m_eff)) begin failures++; $display("p%0d: length %0d expected %0d", p, dp_len, m_eff); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
