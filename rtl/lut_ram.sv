// lut_ram: on-chip look-up memory with one synchronous write port and one
// asynchronous read port (distributed-RAM style).
//
// It holds part of the "dynamic" side of a self-reconfigurable circuit: the
// logic around it is fixed, and its behaviour changes at run time only by
// rewriting words of this table. The shortest-path unit keeps the edge list
// of the graph instance in one, so a new graph is just a series of writes.
//
// Interface: a write of wdata to waddr takes effect at the rising clock edge
// when we is high. rdata follows raddr combinationally, so a word written at
// edge k is visible on rdata right after edge k. Addresses at or above DEPTH
// are ignored on write and read as zero. The contents are not reset; a user
// must write a word before reading it. The asynchronous read is this
// design's choice: it lets the first pipeline stage look up an edge and then
// the distances of its end points in the same cycle.
module lut_ram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;
endmodule
