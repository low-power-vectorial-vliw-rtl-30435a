// scratchpad_mem: local fast memory for the constants of a DP algorithm
// (for Smith-Waterman, the substitution scores).
//
// Execution units can only load from it; the only writer is the Data Stream
// Unit, whose stores to a memory-mapped window of the RAM address space are
// steered here (the window lives in vliw_top). Loads use the same two-step
// protocol as the RAM: INDEX SADDR registers the address (re), SPAD LD reads
// q in the next cycle. Being a separate memory it can serve an execution unit
// in the same cycle as the RAM serves the Data Stream Unit. Whole-word writes
// only. Depth (256 words) is this design's choice.
module scratchpad_mem #(
  parameter int DEPTH = 256,
  parameter int WIDTH = 32,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) q <= mem[raddr];
  end
endmodule
