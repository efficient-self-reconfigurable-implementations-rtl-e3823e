// bram_sdp: simple dual-port block RAM with a registered (synchronous) read.
//
// This is the embedded-RAM form of a look-up memory: one write port and one
// read port, both clocked. At each rising edge the word at raddr is captured
// into rdata; when the same edge writes that address, rdata takes the new
// data (write-first), so a word written at edge k and read at edge k is seen
// right after edge k. The string matcher keeps its pattern and back-edge
// tables in two of these, as the paper realizes them in the FPGA's embedded
// RAM blocks. Contents are not reset; rdata is not reset either.
module bram_sdp #(
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
    if (we && waddr == raddr)       rdata <= wdata;
    else if (32'(raddr) < DEPTH)    rdata <= mem[raddr];
    else                            rdata <= '0;
  end
endmodule
