// tb_logiclet_interconnect: self-checking test of the addressable
// interconnect.
//
// After reset every logiclet input must be zero (no active interconnect).
// Then random rewirings (including deactivations) are written while the
// logiclet outputs change at random; each cycle every logiclet input is
// compared with the output of the logiclet its stored address names, per a
// model of the per-logiclet memory elements kept in the testbench.
module tb_logiclet_interconnect;
  localparam int N = 8, W = 8, AW = 3;
  logic clk = 0, rst_n = 0, cfg_we = 0, cfg_active = 0;
  logic [AW-1:0] cfg_dst = 0, cfg_src = 0;
  logic [N-1:0][W-1:0] lg_out = '0, lg_in;
  logic [N-1:0][AW:0] conn;
  int checks = 0, failures = 0;

  logiclet_interconnect #(.N(N), .DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit act [N];
  int src [N];

  task automatic check_all(string what);
    for (int i = 0; i < N; i++) begin
      automatic logic [W-1:0] exp = act[i] ? lg_out[src[i]] : '0;
      checks++;
      if (lg_in[i] != exp) begin
        failures++;
        if (failures < 10) $display("%s: logiclet %0d input %h expected %h", what, i, lg_in[i], exp);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin act[i] = 0; src[i] = 0; end
    for (int i = 0; i < N; i++) lg_out[i] = W'($urandom);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1 check_all("after reset");
    for (int c = 0; c < 3000; c++) begin
      automatic bit w = ($urandom_range(1) == 1);
      automatic int d = $urandom_range(N - 1), s = $urandom_range(N - 1);
      automatic bit a = ($urandom_range(4) != 0);
      cfg_we <= w; cfg_dst <= AW'(d); cfg_src <= AW'(s); cfg_active <= a;
      @(posedge clk);
      if (w) begin act[d] = a; src[d] = s; end
      for (int i = 0; i < N; i++) lg_out[i] = W'($urandom);
      #1 check_all("rewire");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
