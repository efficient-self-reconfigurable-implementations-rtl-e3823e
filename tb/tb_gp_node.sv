// tb_gp_node: self-checking test of a genetic-programming tree node.
//
// For every function code and many random operand pairs, the node output is
// compared with the function computed in the testbench.
module tb_gp_node;
  import gp_pkg::*;
  localparam int W = 8;
  logic [FUNC_W-1:0] func = 0;
  logic [W-1:0] a = 0, b = 0, y;
  int checks = 0, failures = 0;

  gp_node #(.DATA_W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] ref_f(int f, logic [W-1:0] x, logic [W-1:0] z);
    case (f)
      0: return x + z;
      1: return x - z;
      2: return x & z;
      default: return x ^ z;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 2000; i++) begin
      for (int f = 0; f < NUM_FUNCS; f++) begin
        func = FUNC_W'(f); a = W'($urandom); b = W'($urandom);
        #1;
        checks++;
        if (y != ref_f(f, a, b)) begin
          failures++;
          if (failures < 10) $display("func %0d a %h b %h: y %h expected %h", f, a, b, y, ref_f(f, a, b));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
