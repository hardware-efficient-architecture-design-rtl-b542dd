// tree_mem: on-chip wavelet-tree memory, a two-port SRAM (one write port,
// one read port) holding one wavelet tree in tree-depth (breadth-first)
// order, so that a forward address sweep is the top-down scan and a backward
// sweep the bottom-up scan.
//
// Timing: a write is taken at the clock edge when we is high. A read issued
// with re high returns the word on rdata one cycle later; rdata holds its
// value while re is low. A read and a write to the same address in the same
// cycle return the old word. The two-port organisation and the size of one
// tree follow the architecture; the read latency and the word layout are
// this design's choices.
module tree_mem #(
  parameter int unsigned DEPTH = 341,
  parameter int unsigned WIDTH = 34,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

`ifndef SYNTHESIS
  always_ff @(posedge clk) begin
    if (we) assert (int'(waddr) < DEPTH) else $error("tree_mem: write address %0d out of range", waddr);
    if (re) assert (int'(raddr) < DEPTH) else $error("tree_mem: read address %0d out of range", raddr);
  end
`endif

endmodule
