// tb_bf_pipeline: self-checking test of the three-stage relaxation pipeline.
//
// The testbench models the graph memory and the data memory (asynchronous
// reads, write at the clock edge) and feeds random edge numbers, with random
// bubbles, over a graph of only four vertices so that consecutive edges often
// touch the same vertex. A sequential reference relaxes each edge the moment
// it is issued; the pipeline must produce the same write, two cycles later
// (write at the edge ending the cycle after stage 2), and the same final
// distances. It also checks busy and that the bypass was used.
module tb_bf_pipeline;
  import bf_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  eid_t in_edge = 0, edge_raddr;
  edge_t edge_rdata;
  vid_t rd_addr_u, rd_addr_v, wr_addr;
  dist_t rd_data_u, rd_data_v, wr_data;
  logic wr_en, busy, bypass;
  int checks = 0, failures = 0;

  bf_pipeline dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NV = 4, NE = 16;
  edge_t graph [NE];
  dist_t mem [MAX_V];
  dist_t ref_d [NV];
  assign edge_rdata = graph[edge_raddr];
  assign rd_data_u  = mem[rd_addr_u];
  assign rd_data_v  = mem[rd_addr_v];
  always @(posedge clk) if (wr_en) mem[wr_addr] <= wr_data;

  // expected write per issue slot, 2 cycles later
  logic  exp_en  [3];
  vid_t  exp_a   [3];
  dist_t exp_dat [3];
  int n_byp = 0, n_wr = 0;

  initial begin
    for (int i = 0; i < 3; i++) exp_en[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 50; r++) begin
      for (int i = 0; i < NE; i++)
        graph[i] = '{src: vid_t'($urandom_range(NV-1)), dst: vid_t'($urandom_range(NV-1)),
                     weight: dist_t'($urandom_range(20))};
      for (int v = 0; v < NV; v++) begin
        mem[v]   = (v == 0) ? 16'd0 : ($urandom_range(1) ? INF : dist_t'(100 + $urandom_range(100)));
        ref_d[v] = mem[v];
      end
      for (int c = 0; c < 60 + 2; c++) begin
        automatic bit   iv = (c < 60) && ($urandom_range(4) != 0);
        automatic int   ie = $urandom_range(NE - 1);
        automatic edge_t ed = graph[ie];
        in_valid <= iv; in_edge <= eid_t'(ie);
        // sequential reference
        exp_en[0] = 0;
        if (iv && ref_d[ed.src] != INF && 32'(ref_d[ed.src]) + 32'(ed.weight) < 32'(ref_d[ed.dst])) begin
          ref_d[ed.dst] = ref_d[ed.src] + ed.weight;
          exp_en[0] = 1; exp_a[0] = ed.dst; exp_dat[0] = ref_d[ed.dst];
        end
        #1;
        checks++;
        if (wr_en != exp_en[2] || (wr_en && (wr_addr != exp_a[2] || wr_data != exp_dat[2]))) begin
          failures++;
          if (failures < 10) $display("round %0d cycle %0d: write %0d %0d=%0d expected %0d %0d=%0d",
            r, c, wr_en, wr_addr, wr_data, exp_en[2], exp_a[2], exp_dat[2]);
        end
        if (bypass) n_byp++;
        if (wr_en) n_wr++;
        @(posedge clk);
        exp_en[2] = exp_en[1]; exp_a[2] = exp_a[1]; exp_dat[2] = exp_dat[1];
        exp_en[1] = exp_en[0]; exp_a[1] = exp_a[0]; exp_dat[1] = exp_dat[0];
      end
      in_valid <= 0;
      @(posedge clk);
      checks++;
      if (busy) begin failures++; $display("busy after drain"); end
      for (int v = 0; v < NV; v++) begin
        checks++;
        if (mem[v] != ref_d[v]) begin failures++; $display("round %0d vertex %0d: %0d expected %0d", r, v, mem[v], ref_d[v]); end
      end
    end
    checks++;
    if (n_byp == 0 || n_wr == 0) begin failures++; $display("no bypass or no write"); end
    $display("bypasses %0d writes %0d", n_byp, n_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
