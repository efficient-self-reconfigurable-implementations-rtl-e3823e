// tb_bram_sdp: self-checking test of the block RAM with registered read.
//
// Random writes and reads against a model array. The read data must appear
// one clock edge after the address, and a read of the address written at the
// same edge must return the new data (write-first).
module tb_bram_sdp;
  localparam int W = 10, D = 7, AW = 3;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0, n_same = 0;

  bram_sdp #(.WIDTH(W), .DEPTH(D), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < D; a++) begin
      we <= 1; waddr <= AW'(a); wdata <= W'($urandom);
      @(posedge clk); #1;
      model[a] = wdata;
    end
    for (int i = 0; i < 5000; i++) begin
      automatic bit w = ($urandom_range(1) == 1);
      automatic int wa = $urandom_range(D - 1);
      automatic int ra = ($urandom_range(3) == 0) ? wa : $urandom_range(D - 1);
      automatic logic [W-1:0] wd = W'($urandom);
      automatic logic [W-1:0] exp;
      we <= w; waddr <= AW'(wa); wdata <= wd; raddr <= AW'(ra);
      @(posedge clk);
      if (w) model[wa] = wd;
      if (w && wa == ra) n_same++;
      exp = model[ra];
      #1;
      checks++;
      if (rdata !== exp) begin
        failures++;
        if (failures < 10) $display("read %0d: %h expected %h (write %0d to %0d)", ra, rdata, exp, w, wa);
      end
    end
    checks++;
    if (n_same == 0) begin failures++; $display("no read during write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
