// tb_vliw_top: end-to-end test of the processor at its default parameters.
//
// The testbench assembles a Smith-Waterman kernel (linear gap) for the four
// execution units and the Data Stream Unit, loads it with the host port and
// runs it. Each unit holds four query rows (16 rows in all) as one vector of
// 8-bit cells and the units sweep the score matrix along anti-diagonals in
// lockstep: on anti-diagonal d unit u computes cells (4u+k, d-4u-k). Per
// iteration a unit
//   * takes its "up" boundary from its left neighbour's published H vector
//     by sniffing R30 (unit 0 uses zero, the matrix border);
//   * slides its reference window: unit 0 indexes the next reference symbol
//     in RAM, the Data Stream Unit loads it into unit 0's R31 and, in the
//     same instruction, shifts R31 of every unit one unit to the right;
//   * computes the substitution score (CMP, MUL, SUM), the three recursion
//     sums in one broadcast (Td) SUM, two MAX and a MAX with zero;
//   * keeps a running maximum per row.
// Before the loop the Data Stream Unit copies constants from the RAM into
// the scratchpad through its memory-mapped window, and the units fetch them
// with INDEX SADDR / SPAD LD. At the end the units store their row maxima
// (all four in one bundle, so they queue for the RAM write port behind a
// Data Stream store) and the results are read back and compared with a
// reference computed here. Every mechanism is counted: structural stalls,
// forwarding, sniffing, taken branches, broadcast writes, Data Stream loads,
// stores and shifts, scratchpad writes and Data Stream port priority.
module tb_vliw_top;
  import vliw_pkg::*;

  localparam int N        = 4;
  localparam int BW       = DSU_INSTR_W + N * EU_INSTR_W;
  localparam int NREF     = 40;        // reference length
  localparam int QLEN     = 4 * N;     // query length
  localparam int ITER     = NREF + QLEN - 1;
  localparam int REF_BASE = 64;
  localparam int OUT_BASE = 200;
  localparam int MA = 3, MI = -1, G = 2;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, run = 0;
  logic host_imem_we = 0, host_ram_we = 0, host_spad_we = 0, host_ram_re = 0;
  logic [8:0] host_imem_addr = '0;
  logic [BW-1:0] host_imem_wdata = '0;
  logic [9:0] host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  logic [PC_W-1:0] pc;
  evt_t evt;

  vliw_top dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  // ---------------- assembler ----------------
  logic [BW-1:0] prog [512];
  int nb;

  function automatic logic [5:0] ctl(esz_e esz, logic [1:0] sub = 0, logic uns = 0, logic imm = 0);
    return {esz, sub, uns, imm};
  endfunction
  function automatic eu_instr_t ei(opcode_e op, logic [5:0] c, logic [4:0] rd, logic [4:0] ra,
                                   logic [4:0] rb, logic we = 1, logic td = 0, logic ta = 0,
                                   logic tb = 0);
    return '{we: we, td: td, rd: rd, ta: ta, ra: ra, tb: tb, rb: rb, opcode: op, opctl: c};
  endfunction
  // immediate form: Rb field and Tb carry a 6-bit signed constant
  function automatic eu_instr_t eimm(opcode_e op, logic [5:0] c, logic [4:0] rd, logic [4:0] ra,
                                     int imm, logic ta = 0);
    logic [5:0] i6 = 6'(imm);
    return '{we: 1, td: 0, rd: rd, ta: ta, ra: ra, tb: i6[5], rb: i6[4:0], opcode: op,
             opctl: c | 6'b1};
  endfunction
  function automatic eu_instr_t ebr(brcond_e cond, int target, logic [4:0] ra, logic [4:0] rb);
    logic [8:0] t = 9'(target);
    return '{we: 0, td: t[5], rd: t[4:0], ta: 0, ra: ra, tb: 0, rb: rb, opcode: OP_BR,
             opctl: {t[8:6], cond}};
  endfunction
  task automatic put(int b, int u, eu_instr_t i);
    prog[b][DSU_INSTR_W + u*EU_INSTR_W +: EU_INSTR_W] = i;
  endtask
  task automatic put_all(int b, eu_instr_t i);
    for (int u = 0; u < N; u++) put(b, u, i);
  endtask
  task automatic put_dsu(int b, dsu_instr_t d);
    prog[b][DSU_INSTR_W-1:0] = d;
  endtask

  // ---------------- reference model ----------------
  byte qs [QLEN];
  byte rs [NREF + QLEN];
  int  hm [QLEN][NREF + QLEN];
  int  rowmax [QLEN];

  task automatic reference();
    for (int i = 0; i < QLEN; i++) begin
      rowmax[i] = 0;
      for (int j = 0; j < NREF + QLEN; j++) begin
        int up, left, dg, s, h;
        up   = (i > 0) ? hm[i-1][j] : 0;
        left = (j > 0) ? hm[i][j-1] : 0;
        dg   = (i > 0 && j > 0) ? hm[i-1][j-1] : 0;
        s    = (qs[i] == rs[j]) ? MA : MI;
        h = 0;
        if (up - G > h) h = up - G;
        if (left - G > h) h = left - G;
        if (dg + s > h) h = dg + s;
        hm[i][j] = h;
        if (j < NREF && h > rowmax[i]) rowmax[i] = h;
      end
    end
  endtask

  // constants copied RAM -> scratchpad by the Data Stream Unit
  localparam int C_NG = 0, C_DIFF = 1, C_MI = 2, C_Q = 3, C_REF = 7, C_ITER = 8, NCONST = 9;
  localparam int DUMMY = 30;

  int loop_start, loop_end, halt_at, st_at;
  int cnt_stall, cnt_fwd, cnt_sniff, cnt_br, cnt_bc, cnt_dl, cnt_ds, cnt_sh, cnt_sw, cnt_pri;
  int loop_cycles;

  task automatic build();
    int b;
    // list of scratchpad loads: {unit, const, reg}
    int lu [$], lc [$], lr [$];
    for (int i = 0; i < 512; i++) prog[i] = '0;
    // --- phase 1: Data Stream copies constants RAM[c] -> scratchpad[c] via
    // unit 0's memory registers (index, load, store pipelined).
    b = 0;
    for (int k = 0; k < NCONST + 2; k++) begin
      dsu_instr_t d = '0;
      if (k < NCONST) begin d.addr_en = 1; d.l_madd = MADDR_W'(k); end
      if (k == NCONST) begin d.addr_en = 1; d.l_madd = MADDR_W'(DUMMY); end
      if (k >= 1 && k - 1 < NCONST) begin d.reg_we = 1; d.l_unit = 0; d.l_radd = 2'((k-1) % 4); end
      if (k >= 2) begin
        d.mwe = 1; d.w_unit = 0; d.w_radd = 2'((k-2) % 4); d.w_madd = MADDR_W'(768 + k - 2);
      end
      put_dsu(b, d);
      // unit 1 indexes RAM in the same cycle as the Data Stream Unit: it waits
      if (k == NCONST) put(b, 1, eimm(OP_IDXM, ctl(ESZ_W), 0, 0, DUMMY));
      b++;
    end
    // --- phase 2: units fetch constants from the scratchpad
    for (int u = 0; u < N; u++) begin
      lu.push_back(u); lc.push_back(C_NG);   lr.push_back(2);
      lu.push_back(u); lc.push_back(C_NG);   lr.push_back(10);
      lu.push_back(u); lc.push_back(C_DIFF); lr.push_back(6);
      lu.push_back(u); lc.push_back(C_MI);   lr.push_back(7);
      lu.push_back(u); lc.push_back(C_Q + u); lr.push_back(4);
    end
    lu.push_back(0); lc.push_back(C_REF);  lr.push_back(17);
    lu.push_back(1); lc.push_back(C_ITER); lr.push_back(20);
    begin
      // interleave the units so that consecutive loads use different units
      int ord [$];
      for (int r = 0; r < 6; r++)
        for (int u = 0; u < N; u++) begin
          int seen = 0;
          foreach (lu[i]) if (lu[i] == u) begin
            if (seen == r) ord.push_back(i);
            seen++;
          end
        end
      for (int t = 0; t <= ord.size(); t++) begin
        if (t < ord.size()) put(b, lu[ord[t]], eimm(OP_IDXS, ctl(ESZ_W), 0, 0, lc[ord[t]]));
        if (t > 0) put(b, lu[ord[t-1]], ei(OP_SPLD, ctl(ESZ_W), 5'(lr[ord[t-1]]), 0, 0));
        if (t > 0 && t < ord.size() && lu[ord[t]] == lu[ord[t-1]]) $fatal(1, "schedule");
        b++;
      end
    end
    // --- phase 3: units load their output address from RAM (INDEX MADDR, LD)
    for (int t = 0; t <= N; t++) begin
      if (t < N) put(b, t, eimm(OP_IDXM, ctl(ESZ_W), 0, 0, 16 + t));
      if (t > 0) put(b, t - 1, ei(OP_LD, ctl(ESZ_W), 19, 0, 0));
      b++;
    end
    // --- phase 4: the anti-diagonal loop
    loop_start = b;
    put_all(b, ei(OP_LOGIC, ctl(ESZ_W), 13, 1, 0)); b++;                     // D <- U
    put_all(b, eimm(OP_SHIFT, ctl(ESZ_W, 2'd3), 12, 9, 8)); b++;              // Hp << 8
    for (int u = 1; u < N; u++)                                               // sniff up row
      put(b, u, eimm(OP_SHIFT, ctl(ESZ_W, 2'd1), 16, 30, 24, 1'b1));
    put(b, 0, eimm(OP_IDXM, ctl(ESZ_W), 0, 17, 0)); b++;                     // next ref symbol
    for (int u = 1; u < N; u++) put(b, u, ei(OP_LOGIC, ctl(ESZ_W), 1, 12, 16));
    put(b, 0, ei(OP_LOGIC, ctl(ESZ_W), 1, 12, 0));                            // U
    begin
      dsu_instr_t d = '0;
      d.reg_we = 1; d.l_unit = 0; d.l_radd = 2'd3;                            // unit 0 R31 <- RAM
      d.shift_en = 1; d.shift_left = 0; d.shift_addr = 2'd3;                  // R31 window
      put_dsu(b, d);
    end
    b++;
    put_all(b, eimm(OP_SHIFT, ctl(ESZ_W, 2'd3), 12, 5, 8)); b++;              // R << 8
    put_all(b, eimm(OP_SHIFT, ctl(ESZ_W, 2'd1), 16, 31, 24)); b++;            // new symbol
    put_all(b, ei(OP_LOGIC, ctl(ESZ_W), 5, 12, 16)); b++;                     // R
    put_all(b, ei(OP_CMP, ctl(ESZ_8, 2'd0), 12, 4, 5)); b++;                  // Q == R
    put_all(b, ei(OP_MUL, ctl(ESZ_8), 12, 12, 6)); b++;
    put_all(b, ei(OP_SUM, ctl(ESZ_8), 14, 12, 7)); b++;                       // S
    put_all(b, ei(OP_SUM, ctl(ESZ_8), 3, 1, 2, 1, 1)); b++;                   // 3 sums (Td)
    put_all(b, ei(OP_MAX, ctl(ESZ_8), 3, 3, 11)); b++;
    put_all(b, ei(OP_MAX, ctl(ESZ_8), 3, 3, 15)); b++;
    put_all(b, eimm(OP_MAX, ctl(ESZ_8), 9, 3, 0)); b++;                       // H
    put_all(b, ei(OP_MAX, ctl(ESZ_8), 8, 8, 9)); b++;                         // row max
    put_all(b, ei(OP_LOGIC, ctl(ESZ_W), 30, 9, 0)); b++;                      // publish H
    put(b, 0, eimm(OP_SUM, ctl(ESZ_W), 17, 17, 1));
    put(b, 1, eimm(OP_SUM, ctl(ESZ_W), 18, 18, 1));
    put(b, 2, ei(OP_LOGIC, ctl(ESZ_W), 31, 5, 0));
    put(b, 3, ei(OP_LOGIC, ctl(ESZ_W), 31, 5, 0)); b++;
    put(b, 1, ebr(BR_NE, loop_start, 18, 20));                                // BNED
    put(b, 0, ei(OP_LOGIC, ctl(ESZ_W), 31, 5, 0)); b++;
    put(b, 1, ei(OP_LOGIC, ctl(ESZ_W), 31, 5, 0)); b++;                       // delay slot 1
    b++;                                                                      // delay slot 2
    loop_end = b;
    // --- phase 5: results
    st_at = b;
    for (int u = 0; u < N; u++) put(b, u, ei(OP_ST, ctl(ESZ_W), 0, 19, 8, 0));
    begin
      dsu_instr_t d = '0;
      d.mwe = 1; d.w_unit = 2'(N - 1); d.w_radd = 2'd2; d.w_madd = MADDR_W'(OUT_BASE + 8);
      put_dsu(b, d);
    end
    b++;
    halt_at = b;
    put(b, 0, ebr(BR_ALWAYS, halt_at, 0, 0)); b += 3;
    nb = b;
  endtask

  initial begin
    int cyc, cyc_loop0, cyc_loop1;
    // sequences: symbols 1..4, reference padding 0 never matches
    for (int i = 0; i < QLEN; i++) qs[i] = byte'($urandom_range(1, 4));
    for (int j = 0; j < NREF + QLEN; j++) rs[j] = (j < NREF) ? byte'($urandom_range(1, 4)) : 0;
    for (int j = 0; j < 12; j++) rs[5 + j] = qs[2 + j];   // plant a strong local match
    reference();
    build();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load program
    for (int i = 0; i < nb; i++) begin
      @(negedge clk); host_imem_we = 1; host_imem_addr = 9'(i); host_imem_wdata = prog[i];
    end
    @(negedge clk); host_imem_we = 0;
    // load data
    begin
      word_t mem [int];
      for (int k = 0; k < 4; k++) begin
        mem[C_NG][k*8 +: 8]   = 8'(-G);
        mem[C_DIFF][k*8 +: 8] = 8'(MA - MI);
        mem[C_MI][k*8 +: 8]   = 8'(MI);
      end
      for (int u = 0; u < N; u++)
        for (int k = 0; k < 4; k++) mem[C_Q + u][k*8 +: 8] = qs[4*u + k];
      mem[C_REF]  = REF_BASE;
      mem[C_ITER] = ITER;
      for (int u = 0; u < N; u++) mem[16 + u] = OUT_BASE + u;
      mem[DUMMY] = 32'hDEAD_BEEF;
      for (int j = 0; j < NREF + QLEN; j++) mem[REF_BASE + j] = {rs[j], 24'd0};
      foreach (mem[a]) begin
        @(negedge clk); host_ram_we = 1; host_addr = 10'(a); host_wdata = mem[a];
      end
      @(negedge clk); host_ram_we = 0;
    end
    // run
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; run = 1;
    cyc = 0; cyc_loop0 = 0; cyc_loop1 = 0;
    cnt_stall = 0; cnt_fwd = 0; cnt_sniff = 0; cnt_br = 0; cnt_bc = 0;
    cnt_dl = 0; cnt_ds = 0; cnt_sh = 0; cnt_sw = 0; cnt_pri = 0;
    while (cyc < 100000) begin
      @(posedge clk);
      cyc++;
      cnt_stall += int'(evt.stall); cnt_fwd += int'(evt.forward); cnt_sniff += int'(evt.sniff);
      cnt_br += int'(evt.branch); cnt_bc += int'(evt.broadcast); cnt_dl += int'(evt.dsu_load);
      cnt_ds += int'(evt.dsu_store); cnt_sh += int'(evt.dsu_shift); cnt_sw += int'(evt.spad_write);
      cnt_pri += int'(evt.dsu_priority);
      if (cyc_loop0 == 0 && pc == PC_W'(loop_start)) cyc_loop0 = cyc;
      if (cyc_loop1 == 0 && pc == PC_W'(st_at)) cyc_loop1 = cyc;
      if (pc == PC_W'(halt_at + 2) && cnt_br > ITER) break;
    end
    repeat (8) @(posedge clk);
    @(negedge clk); run = 0;
    loop_cycles = cyc_loop1 - cyc_loop0;
    // read back row maxima and the last published H of unit 3
    for (int u = 0; u <= N; u++) begin
      int a;
      a = (u < N) ? OUT_BASE + u : OUT_BASE + 8;
      @(negedge clk); host_ram_re = 1; host_addr = 10'(a);
      @(negedge clk); host_ram_re = 0; #1;
      for (int k = 0; k < 4; k++)
        if (u < N) check($sformatf("row %0d max", 4*u + k), 64'(host_rdata[k*8 +: 8]),
                         64'(8'(rowmax[4*u + k])));
        else check($sformatf("last H row %0d", 12 + k), 64'(host_rdata[k*8 +: 8]),
                   64'(8'(hm[12 + k][ITER - 1 - 12 - k])));
    end
    begin
      int best = 0;
      foreach (rowmax[i]) if (rowmax[i] > best) best = rowmax[i];
      $display("best local alignment score %0d", best);
    end
    // branch count: ITER-1 taken loop branches (the last falls through) + halt spins
    check("loop branches", 64'(cnt_br >= ITER), 1);
    // the loop body is 20 bundles; stalls add the serialisation of shared FUs
    $display("loop: %0d cycles for %0d anti-diagonals, %0d cells: %0.2f cycles/cell",
             loop_cycles, ITER, QLEN * NREF, real'(loop_cycles) / real'(QLEN * NREF));
    check("loop length", 64'(loop_cycles >= ITER * (loop_end - loop_start)), 1);
    $display("events: stall=%0d forward=%0d sniff=%0d branch=%0d broadcast=%0d dsu_load=%0d",
             cnt_stall, cnt_fwd, cnt_sniff, cnt_br, cnt_bc, cnt_dl);
    $display("        dsu_store=%0d dsu_shift=%0d spad_write=%0d dsu_priority=%0d",
             cnt_ds, cnt_sh, cnt_sw, cnt_pri);
    check("stall seen", 64'(cnt_stall > 0), 1);
    check("forward seen", 64'(cnt_fwd > 0), 1);
    check("sniff seen", 64'(cnt_sniff > 0), 1);
    check("branch seen", 64'(cnt_br > 0), 1);
    check("broadcast seen", 64'(cnt_bc > 0), 1);
    check("dsu load seen", 64'(cnt_dl > 0), 1);
    check("dsu store seen", 64'(cnt_ds > 0), 1);
    check("dsu shift count", 64'(cnt_sh), 64'(ITER));
    check("spad writes", 64'(cnt_sw), 64'(NCONST));
    check("dsu priority seen", 64'(cnt_pri > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
