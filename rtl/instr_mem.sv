// instr_mem: instruction memory holding one VLIW bundle per word.
//
// A bundle is the Data Stream Unit slot (bits 34..0) followed by one 32-bit
// slot per execution unit, unit 0 lowest (bits 66..35 for unit 0, and so on),
// 163 bits for four units. The read is synchronous: the bundle at addr appears
// on q one cycle after en, which forms the FETCH stage. A write port lets a
// host load the program while the processor is idle; the loading path and the
// depth (512 bundles, the reach of a 9-bit branch target) are this design's
// choices.
module instr_mem #(
  parameter int DEPTH = 512,
  parameter int WIDTH = 163,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic [AW-1:0]    addr,
  output logic [WIDTH-1:0] q,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (en) q <= mem[addr];
  end
endmodule
