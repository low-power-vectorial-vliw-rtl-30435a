// reg_bank: private register bank of one execution unit.
//
// 32 registers of one vector word each: R0..R27 are private to the unit and
// R28..R31 are its four "memory" registers. Only the owning unit writes the
// bank through its three write ports (three ports because a broadcast
// instruction writes three registers at once), but the Data Stream Unit can
// also write the memory registers (loads from RAM and the register-window
// shift) through mw_en/mw_data, and those writes win over the owner's, as the
// source requires. All writes happen at the clock edge of the WRITE-BACK
// stage. Besides the stored registers the bank outputs a "view" in which this
// cycle's pending writes are already applied; the EXECUTE stage reads the
// view, which is the pipeline's forwarding path. Reset clears every register
// (a choice of this design).
module reg_bank
  import vliw_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  we,
  input  logic [4:0]  waddr [3],
  input  word_t       wdata [3],
  input  logic [NMEMREGS-1:0] mw_en,
  input  word_t       mw_data [NMEMREGS],
  output word_t       regs [NREGS],
  output word_t       view [NREGS]
);
  always_comb begin
    view = regs;
    for (int p = 0; p < 3; p++)
      if (we[p]) view[waddr[p]] = wdata[p];
    for (int m = 0; m < NMEMREGS; m++)
      if (mw_en[m]) view[MEMREG_BASE + m] = mw_data[m];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) regs <= '{default: '0};
    else        regs <= view;
  end
endmodule
