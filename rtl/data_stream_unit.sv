// data_stream_unit: the Data Stream Unit, which moves data between the RAM
// and the memory registers (R28..R31) of the execution units while they
// compute.
//
// Its 35-bit instruction holds three independent operations that run in the
// same cycle:
//  * load (bits 15..0): with AddrEN it indexes RAM address Madd on the RAM
//    read port; with regWE it writes the word the RAM presents (the result of
//    the previous cycle's index, by any unit) into memory register Radd of
//    execution unit Unit;
//  * memory write (bits 30..16): with MWE it stores memory register Radd of
//    unit Unit at address Madd. Addresses inside the window
//    [SPAD_BASE, SPAD_BASE+SPAD_DEPTH) go to the scratchpad instead of the
//    RAM: this is how the scratchpad constants are loaded;
//  * register-window shift (bits 34..31): with ShiftEN, memory register
//    ShiftAddr of every unit takes the value of the same register of its
//    neighbour: of unit u-1 when Left/Right is 0 (shift from unit 0 towards
//    unit n), of unit u+1 when it is 1. The end unit that has no source keeps
//    its value, unless the load writes it in the same cycle.
// The unit acts in the bundle's first EXECUTE cycle (go). Its RAM accesses
// win over those of the execution units (ram_idx_en / ram_wr_en tell the FU
// pool). Its register writes are staged to the WRITE-BACK cycle, where they
// override the execution units' own writes to the same memory registers, a
// load overriding the shift. Field layout and priorities follow the source;
// the scratchpad window position and the bit meaning of Left/Right are this
// design's choices.
module data_stream_unit
  import vliw_pkg::*;
#(
  parameter int N_UNITS    = 4,
  parameter int SPAD_BASE  = 768,
  parameter int SPAD_DEPTH = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       go,
  input  dsu_instr_t instr,
  input  word_t      mem_view [N_UNITS][NMEMREGS],  // forwarded, for store data
  input  word_t      mem_regs [N_UNITS][NMEMREGS],  // stored, for the shift
  input  word_t      ram_q,
  output logic       ram_idx_en,
  output logic [MADDR_W-1:0] ram_idx_addr,
  output logic       ram_wr_en,
  output logic       spad_wr_en,
  output logic [MADDR_W-1:0] wr_addr,
  output word_t      wr_data,
  output logic [NMEMREGS-1:0] mw_en [N_UNITS],
  output word_t      mw_data [N_UNITS][NMEMREGS],
  output logic       evt_load,
  output logic       evt_store,
  output logic       evt_shift
);
  logic in_spad;
  // WRITE-BACK stage state
  logic        ld_v, sh_v, sh_left;
  logic [1:0]  ld_unit, ld_radd, sh_addr;
  word_t       ld_data;

  assign in_spad      = 32'(instr.w_madd) >= 32'(SPAD_BASE) &&
                        32'(instr.w_madd) <  32'(SPAD_BASE + SPAD_DEPTH);
  assign ram_idx_en   = go && instr.addr_en;
  assign ram_idx_addr = instr.l_madd;
  assign ram_wr_en    = go && instr.mwe && !in_spad;
  assign spad_wr_en   = go && instr.mwe && in_spad;
  assign wr_addr      = instr.w_madd;
  assign wr_data      = (32'(instr.w_unit) < N_UNITS) ? mem_view[instr.w_unit][instr.w_radd] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_v <= 1'b0; sh_v <= 1'b0; sh_left <= 1'b0;
      ld_unit <= '0; ld_radd <= '0; sh_addr <= '0; ld_data <= '0;
    end else begin
      ld_v    <= go && instr.reg_we && 32'(instr.l_unit) < N_UNITS;
      ld_unit <= instr.l_unit;
      ld_radd <= instr.l_radd;
      ld_data <= ram_q;
      sh_v    <= go && instr.shift_en;
      sh_left <= instr.shift_left;
      sh_addr <= instr.shift_addr;
    end
  end

  always_comb begin
    for (int u = 0; u < N_UNITS; u++) begin
      mw_en[u] = '0;
      for (int m = 0; m < NMEMREGS; m++) mw_data[u][m] = mem_regs[u][m];
      if (sh_v) begin
        if (!sh_left && u > 0) begin
          mw_en[u][sh_addr]   = 1'b1;
          mw_data[u][sh_addr] = mem_regs[u-1][sh_addr];
        end
        if (sh_left && u < N_UNITS - 1) begin
          mw_en[u][sh_addr]   = 1'b1;
          mw_data[u][sh_addr] = mem_regs[u+1][sh_addr];
        end
      end
      if (ld_v && 32'(ld_unit) == u) begin
        mw_en[u][ld_radd]   = 1'b1;
        mw_data[u][ld_radd] = ld_data;
      end
    end
  end

  assign evt_load  = go && (instr.addr_en || instr.reg_we);
  assign evt_store = go && instr.mwe;
  assign evt_shift = go && instr.shift_en;
endmodule
