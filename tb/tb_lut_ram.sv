// tb_lut_ram: self-checking test of the look-up memory.
//
// Random writes and reads against a model array: a written word must be
// readable through the asynchronous read port right after the write edge,
// unwritten addresses keep their value, and disabled writes change nothing.
module tb_lut_ram;
  localparam int W = 12, D = 7, AW = 3;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  lut_ram #(.WIDTH(W), .DEPTH(D), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word first
    for (int a = 0; a < D; a++) begin
      we <= 1; waddr <= AW'(a); wdata <= W'($urandom); model[a] = 'x;
      @(posedge clk); #1;
      model[a] = wdata;
    end
    we <= 0;
    for (int i = 0; i < 2000; i++) begin
      automatic bit          w  = ($urandom_range(1) == 1);
      automatic int          wa = $urandom_range(D - 1);
      automatic logic [W-1:0] wd = W'($urandom);
      we <= w; waddr <= AW'(wa); wdata <= wd;
      @(posedge clk);
      if (w) model[wa] = wd;
      #1;
      for (int a = 0; a < D; a++) begin
        raddr = AW'(a);
        #0.1;
        checks++;
        if (rdata != model[a]) begin
          failures++;
          if (failures < 10) $display("addr %0d read %h expected %h", a, rdata, model[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
