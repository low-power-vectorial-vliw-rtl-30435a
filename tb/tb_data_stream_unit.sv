// tb_data_stream_unit: checks the three parallel operations of the Data
// Stream Unit with random instructions: RAM index, memory write (with the
// scratchpad window) and, one cycle later, the memory-register writes of the
// load and of the register-window shift in both directions, the load
// overriding the shift. A reference computed here from the instruction
// fields is compared with every output.
module tb_data_stream_unit;
  import vliw_pkg::*;
  localparam int N = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, go = 0;
  dsu_instr_t instr;
  word_t mem_view [N][NMEMREGS], mem_regs [N][NMEMREGS], ram_q;
  logic ram_idx_en, ram_wr_en, spad_wr_en, evt_load, evt_store, evt_shift;
  logic [MADDR_W-1:0] ram_idx_addr, wr_addr;
  word_t wr_data;
  logic [NMEMREGS-1:0] mw_en [N];
  word_t mw_data [N][NMEMREGS];

  data_stream_unit #(.N_UNITS(N), .SPAD_BASE(768), .SPAD_DEPTH(256)) dut (.*);

  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  initial begin
    dsu_instr_t prev;
    logic prev_go;
    word_t prev_q;
    instr = '0; ram_q = '0;
    foreach (mem_view[u, m]) begin mem_view[u][m] = '0; mem_regs[u][m] = '0; end
    repeat (2) @(posedge clk); rst_n = 1;
    prev = '0; prev_go = 0; prev_q = '0;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      go = ($urandom % 4) != 0;
      instr = dsu_instr_t'({$urandom, 3'($urandom)});
      ram_q = $urandom;
      foreach (mem_view[u, m]) begin mem_view[u][m] = $urandom; mem_regs[u][m] = $urandom; end
      #1;
      // execute-cycle outputs
      check("idx en", 64'(ram_idx_en), 64'(go && instr.addr_en));
      check("idx addr", 64'(ram_idx_addr), 64'(instr.l_madd));
      check("ram wr", 64'(ram_wr_en), 64'(go && instr.mwe && instr.w_madd < 768));
      check("spad wr", 64'(spad_wr_en), 64'(go && instr.mwe && instr.w_madd >= 768));
      check("wr addr", 64'(wr_addr), 64'(instr.w_madd));
      check("wr data", 64'(wr_data), 64'(mem_view[instr.w_unit][instr.w_radd]));
      check("evt shift", 64'(evt_shift), 64'(go && instr.shift_en));
      // write-back outputs of the previous instruction
      for (int u = 0; u < N; u++)
        for (int m = 0; m < NMEMREGS; m++) begin
          logic e_en; word_t e_d;
          e_en = 0; e_d = mem_regs[u][m];
          if (prev_go && prev.shift_en && m == prev.shift_addr) begin
            if (!prev.shift_left && u > 0)     begin e_en = 1; e_d = mem_regs[u-1][m]; end
            if (prev.shift_left && u < N - 1)  begin e_en = 1; e_d = mem_regs[u+1][m]; end
          end
          if (prev_go && prev.reg_we && u == prev.l_unit && m == prev.l_radd) begin
            e_en = 1; e_d = prev_q;
          end
          check("mw en", 64'(mw_en[u][m]), 64'(e_en));
          if (e_en) check("mw data", 64'(mw_data[u][m]), 64'(e_d));
        end
      @(posedge clk);
      prev = instr; prev_go = go; prev_q = ram_q;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
