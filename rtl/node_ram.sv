// Single-port synchronous RAM used as the main (graph) memory.
//
// One access per cycle: a write when `we` is high, otherwise a read whose
// data appears on `rdata` in the next cycle. The array has DEPTH words of
// WIDTH bits and is not reset (memory contents are loaded by the host before
// a program runs). Plain inferred memory; the architecture places the graph
// in ordinary (possibly off-chip) RAM, which this stands in for.
module node_ram #(
  parameter int DEPTH = 2048,
  parameter int WIDTH = 56
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
