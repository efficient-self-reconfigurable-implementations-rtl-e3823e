// logiclet_interconnect: addressable interconnect between logiclets.
//
// A set of N logiclets is joined by a network of interconnects that all exist
// in the compiled logic; which one is in use is decided at run time. Each
// logiclet has a small data memory element holding the address of its
// currently active interconnect: the number of the logiclet whose output it
// takes, plus an active bit. A multiplexer per logiclet input realises the
// selection, so rewiring is a memory write (cfg_we, cfg_dst, cfg_src,
// cfg_active) rather than a change of the configuration bit-stream.
//
// Interface: lg_out[i] is the output of logiclet i, lg_in[i] the input
// delivered to it: lg_out[src of i] when i's interconnect is active, zero
// otherwise. After reset no interconnect is active. A write takes effect at
// the clock edge; the data path itself is combinational. conn exposes the
// stored addresses. The per-logiclet memory elements and the multiplexer
// follow the paper; the zero on an inactive input and N = 8 (the number
// of logiclets drawn in its figure) are this design's choices.
module logiclet_interconnect #(
  parameter int unsigned N      = 8,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned AW     = (N > 1) ? $clog2(N) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_we,
  input  logic [AW-1:0]             cfg_dst,
  input  logic [AW-1:0]             cfg_src,
  input  logic                      cfg_active,
  input  logic [N-1:0][DATA_W-1:0]  lg_out,
  output logic [N-1:0][DATA_W-1:0]  lg_in,
  output logic [N-1:0][AW:0]        conn      // {active, src} per logiclet
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      conn <= '0;
    end else if (cfg_we && 32'(cfg_dst) < N) begin
      conn[cfg_dst] <= {cfg_active, cfg_src};
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (conn[i][AW] && 32'(conn[i][AW-1:0]) < N) lg_in[i] = lg_out[conn[i][AW-1:0]];
      else                                         lg_in[i] = '0;
    end
  end
endmodule
