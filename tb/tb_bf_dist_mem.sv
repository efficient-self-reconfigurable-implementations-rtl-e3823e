// tb_bf_dist_mem: self-checking test of the distance data memory.
//
// Random writes with both read ports reading random addresses every cycle,
// compared with a model array; a written value must be visible on either
// read port right after its write edge.
module tb_bf_dist_mem;
  import bf_pkg::*;
  logic clk = 0, we = 0;
  vid_t waddr = 0, raddr_a = 0, raddr_b = 0;
  dist_t wdata = 0, rdata_a, rdata_b;
  dist_t model [MAX_V];
  int checks = 0, failures = 0;

  bf_dist_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < MAX_V; a++) begin
      we <= 1; waddr <= vid_t'(a); wdata <= dist_t'($urandom);
      @(posedge clk); #1;
      model[a] = wdata;
    end
    for (int i = 0; i < 5000; i++) begin
      automatic bit    w  = ($urandom_range(1) == 1);
      automatic vid_t  wa = vid_t'($urandom_range(MAX_V - 1));
      automatic dist_t wd = dist_t'($urandom);
      we <= w; waddr <= wa; wdata <= wd;
      @(posedge clk);
      if (w) model[wa] = wd;
      raddr_a = vid_t'($urandom_range(MAX_V - 1));
      raddr_b = (i % 4 == 0) ? wa : vid_t'($urandom_range(MAX_V - 1));
      #1;
      checks++;
      if (rdata_a != model[raddr_a] || rdata_b != model[raddr_b]) begin
        failures++;
        if (failures < 10) $display("read a[%0d]=%h b[%0d]=%h expected %h %h", raddr_a, rdata_a,
          raddr_b, rdata_b, model[raddr_a], model[raddr_b]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
