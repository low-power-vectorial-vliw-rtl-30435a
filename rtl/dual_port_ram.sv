// dual_port_ram: main data memory of the processor.
//
// One write-only port and one load-only port, as the architecture requires.
// A load takes two cycles: in the "index" cycle the address is registered
// (re high), and in the following cycle the word at that address is on q,
// where a LD instruction picks it up. q holds its value until the next index,
// so one unit can index while another loads, giving one load per cycle.
// Writes take effect at the clock edge and carry per-byte enables so that the
// byte and half-word stores can write part of a word. The byte enables and
// the read-during-write behaviour (q shows the old word) are this design's
// choices. Depth defaults to the 1024 words a 10-bit Madd field can address.
module dual_port_ram #(
  parameter int DEPTH = 1024,
  parameter int WIDTH = 32,
  localparam int AW = $clog2(DEPTH),
  localparam int NB = WIDTH / 8
) (
  input  logic             clk,
  // write-only port
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [NB-1:0]    wbe,
  input  logic [WIDTH-1:0] wdata,
  // load-only port: index (re/raddr) then data on q one cycle later
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)
      for (int b = 0; b < NB; b++)
        if (wbe[b]) mem[waddr][b*8 +: 8] <= wdata[b*8 +: 8];
  end

  always_ff @(posedge clk) begin
    if (re) q <= mem[raddr];
  end
endmodule
