// tb_gp_tree: self-checking test of the genetic-programming tree template.
//
// Random representation words are loaded whole, and single nodes are
// rewritten (as a mutation would), each with random terminals. After every
// write the registered result must equal the program evaluated in the
// testbench from the representation word it expects (heap-ordered nodes,
// leaves fed by terminal pairs), one cycle after the write.
module tb_gp_tree;
  import gp_pkg::*;
  localparam int DEPTH = 3, W = 8;
  localparam int NN = (1 << DEPTH) - 1, NT = 1 << DEPTH, IW = $clog2(NN);

  logic clk = 0, rst_n = 0, rep_we = 0, node_we = 0;
  logic [NN*FUNC_W-1:0] rep_wdata = 0, rep;
  logic [IW-1:0] node_idx = 0;
  logic [FUNC_W-1:0] node_func = 0;
  logic [NT-1:0][W-1:0] terms = '0;
  logic [W-1:0] y_comb, result;
  int checks = 0, failures = 0;

  gp_tree #(.DEPTH(DEPTH), .DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NN*FUNC_W-1:0] exp_rep;

  function automatic logic [W-1:0] ref_f(int f, logic [W-1:0] x, logic [W-1:0] z);
    case (f)
      0: return x + z;
      1: return x - z;
      2: return x & z;
      default: return x ^ z;
    endcase
  endfunction

  function automatic logic [W-1:0] eval(int i);
    automatic int f = int'(exp_rep[i*FUNC_W +: FUNC_W]);
    if (i >= NN / 2) return ref_f(f, terms[2*(i - NN/2)], terms[2*(i - NN/2) + 1]);
    return ref_f(f, eval(2*i + 1), eval(2*i + 2));
  endfunction

  task automatic check(string what);
    checks++;
    if (rep != exp_rep || result != eval(0)) begin
      failures++;
      if (failures < 10) $display("%s: rep %h/%h result %h expected %h", what, rep, exp_rep, result, eval(0));
    end
  endtask

  initial begin
    exp_rep = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1 check("after reset");
    for (int i = 0; i < 500; i++) begin
      automatic bit whole = (i % 4 == 0);
      automatic int ni = $urandom_range(NN - 1);
      automatic int nf = $urandom_range(NUM_FUNCS - 1);
      automatic logic [NN*FUNC_W-1:0] w = (NN*FUNC_W)'({$urandom, $urandom});
      for (int t = 0; t < NT; t++) terms[t] = W'($urandom);
      rep_we <= whole; rep_wdata <= w;
      node_we <= !whole; node_idx <= IW'(ni); node_func <= FUNC_W'(nf);
      @(posedge clk);
      rep_we <= 0; node_we <= 0;
      if (whole) exp_rep = w; else exp_rep[ni*FUNC_W +: FUNC_W] = FUNC_W'(nf);
      @(posedge clk);
      #1 check(whole ? "word load" : "node write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
