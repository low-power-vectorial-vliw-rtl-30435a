// tb_sw_affine: Smith-Waterman with the affine gap model (gap open and gap
// extend penalties, Gotoh's recurrences) on the whole processor, for the DNA
// query lengths of the evaluation (20, 68, 74, 85, 94, 685, 1861, 2276)
// against one 4092-symbol reference sequence.
//
// The program extends the linear-gap strip kernel of tb_sw_workload:
//   E (gap along the reference) stays in each element: E = max(E - GE, Hleft - GO);
//   F (gap along the query) moves down the rows like H: the F vector is
//     shifted up one element, its new bottom element sniffed from the left
//     unit's R29 (unit 0: loaded from RAM by the Data Stream Unit), then
//     F = max(Fup - GE, Hup - GO);
//   H = max(0, E, F, Hdiag + S).
// The strip boundary therefore carries two rows: unit 3 stores its H vector
// and its F vector each iteration, and unit 0 of the next strip gets both
// back through the Data Stream Unit into R28. GO includes the first gap
// symbol; E and F start at zero at the matrix border, which only changes
// values that cannot win against the zero of the local alignment.
//
// Checks: best score and the last matrix row against a reference model with
// the same 8-bit wrap-around arithmetic; cycle counts are printed. RAM is
// enlarged to 16384 words (reference + two boundary rows need about 13400);
// by default the five short queries run, RUN_ALL = 1 adds the long ones.
module tb_sw_affine;
  import vliw_pkg::*;

  localparam int  N        = 4;
  localparam int  BW       = DSU_INSTR_W + N * EU_INSTR_W;
  localparam int  RAMD     = 16384;
  localparam int  RAW      = $clog2(RAMD);
  localparam int  NREF     = 4092;
  localparam int  ITER     = NREF + 15;
  localparam bit  RUN_ALL  = 1'b0;
  localparam int  MA = 2, MI = -1, GO = 3, GE = 1;   // open (first gap symbol included), extend
  // memory map (words)
  localparam int  OUT_BASE = 32;
  localparam int  QBASE    = 40;
  localparam int  REF_BASE = 1024;
  localparam int  BOUND    = REF_BASE + ITER + 16;
  localparam int  BOUNDF   = BOUND + ITER + 16;
  localparam int  QLENS [8] = '{20, 68, 74, 85, 94, 685, 1861, 2276};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, run = 0;
  logic host_imem_we = 0, host_ram_we = 0, host_spad_we = 0, host_ram_re = 0;
  logic [8:0] host_imem_addr = '0;
  logic [BW-1:0] host_imem_wdata = '0;
  logic [RAW-1:0] host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  logic [PC_W-1:0] pc;
  evt_t evt;

  vliw_top #(.RAM_DEPTH(RAMD)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100_000_000) @(posedge clk);
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
  int nb, halt_at;

  function automatic logic [5:0] ctl(esz_e esz, logic [1:0] sub = 0);
    return {esz, sub, 2'b00};
  endfunction
  function automatic eu_instr_t ei(opcode_e op, logic [5:0] c, logic [4:0] rd, logic [4:0] ra,
                                   logic [4:0] rb, logic we = 1, logic td = 0, logic ta = 0);
    return '{we: we, td: td, rd: rd, ta: ta, ra: ra, tb: 1'b0, rb: rb, opcode: op, opctl: c};
  endfunction
  function automatic eu_instr_t eimm(opcode_e op, logic [5:0] c, logic [4:0] rd, logic [4:0] ra,
                                     int imm, logic ta = 0, logic td = 0);
    logic [5:0] i6 = 6'(imm);
    return '{we: 1, td: td, rd: rd, ta: ta, ra: ra, tb: i6[5], rb: i6[4:0], opcode: op,
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
  task automatic put_units(int b, eu_instr_t i);   // units 1..N-1
    for (int u = 1; u < N; u++) put(b, u, i);
  endtask
  task automatic put_dsu(int b, dsu_instr_t d);
    prog[b][DSU_INSTR_W-1:0] = d;
  endtask

  // constants, copied RAM -> scratchpad by the Data Stream Unit
  localparam int C_NG = 0, C_DIFF = 1, C_MI = 2, C_REF = 3, C_ITER = 4, C_BOFF = 5,
                 C_BOUND = 6, C_NSTRIP = 7, C_QB = 8, C_BOFFF = 12, C_BOUNDF = 13,
                 NCONST = 14;

  task automatic build();
    int b, s0, l0;
    int lu [$], lc [$], lr [$];
    for (int i = 0; i < 512; i++) prog[i] = '0;
    b = 0;
    // constants to the scratchpad (index, load into unit 0 R28..R31, store)
    for (int k = 0; k < NCONST + 2; k++) begin
      dsu_instr_t d = '0;
      if (k < NCONST) begin d.addr_en = 1; d.l_madd = MADDR_W'(k); end
      if (k >= 1 && k - 1 < NCONST) begin d.reg_we = 1; d.l_unit = 0; d.l_radd = 2'((k-1) % 4); end
      if (k >= 2) begin
        d.mwe = 1; d.w_unit = 0; d.w_radd = 2'((k-2) % 4); d.w_madd = MADDR_W'(768 + k - 2);
      end
      put_dsu(b, d);
      b++;
    end
    // units fetch constants: {unit, constant, register}
    for (int u = 0; u < N; u++) begin
      lu.push_back(u); lc.push_back(C_NG);     lr.push_back(2);
      lu.push_back(u); lc.push_back(C_NG);     lr.push_back(10);
      lu.push_back(u); lc.push_back(C_DIFF);   lr.push_back(6);
      lu.push_back(u); lc.push_back(C_QB + u); lr.push_back(22);
    end
    lu.push_back(0); lc.push_back(C_REF);    lr.push_back(27);
    lu.push_back(1); lc.push_back(C_ITER);   lr.push_back(20);
    lu.push_back(2); lc.push_back(C_NSTRIP); lr.push_back(26);
    lu.push_back(3); lc.push_back(C_BOUND);  lr.push_back(19);
    lu.push_back(0); lc.push_back(C_BOFF);   lr.push_back(24);
    lu.push_back(3); lc.push_back(C_BOUNDF); lr.push_back(27);
    lu.push_back(0); lc.push_back(C_BOFFF);  lr.push_back(18);
    begin
      int ord [$];
      for (int r = 0; r < 8; r++)
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
    // ---- strip prologue
    s0 = b;
    put_all(b, eimm(OP_LOGIC, ctl(ESZ_W, 2'd1), 1, 0, 0, 0, 1)); b++;        // r1,r9,r13 <- 0
    put_all(b, eimm(OP_LOGIC, ctl(ESZ_W, 2'd1), 5, 0, 0)); b++;              // R window <- 0
    put_all(b, eimm(OP_LOGIC, ctl(ESZ_W, 2'd1), 30, 0, 0)); b++;             // R30 <- 0
    put_all(b, eimm(OP_LOGIC, ctl(ESZ_W, 2'd1), 31, 0, 0)); b++;             // R31 <- 0
    put_all(b, eimm(OP_LOGIC, ctl(ESZ_W, 2'd1), 29, 0, 0)); b++;             // R29 <- 0
    put_all(b, eimm(OP_LOGIC, ctl(ESZ_W, 2'd1), 7, 0, 0)); b++;              // E <- 0
    put_all(b, eimm(OP_LOGIC, ctl(ESZ_W, 2'd1), 23, 0, 0)); b++;             // F <- 0
    put(b, 3, ei(OP_LOGIC, ctl(ESZ_W), 24, 27, 0)); b++;
    // query vectors, one unit at a time on the RAM read port
    put(b, 0, eimm(OP_IDXM, ctl(ESZ_W), 0, 22, 0));
    put(b, 1, eimm(OP_LOGIC, ctl(ESZ_W, 2'd1), 18, 0, 0));
    put(b, 3, ei(OP_LOGIC, ctl(ESZ_W), 21, 19, 0)); b++;
    put(b, 0, ei(OP_LD, ctl(ESZ_W), 4, 0, 0)); put(b, 1, eimm(OP_IDXM, ctl(ESZ_W), 0, 22, 0)); b++;
    put(b, 1, ei(OP_LD, ctl(ESZ_W), 4, 0, 0)); put(b, 2, eimm(OP_IDXM, ctl(ESZ_W), 0, 22, 0));
    put(b, 0, ei(OP_LOGIC, ctl(ESZ_W), 17, 27, 0)); b++;
    put(b, 2, ei(OP_LD, ctl(ESZ_W), 4, 0, 0)); put(b, 3, eimm(OP_IDXM, ctl(ESZ_W), 0, 22, 0)); b++;
    put(b, 3, ei(OP_LD, ctl(ESZ_W), 4, 0, 0)); put(b, 0, ei(OP_IDXM, ctl(ESZ_W), 0, 17, 24)); b++;
    put_all(b, eimm(OP_SUM, ctl(ESZ_W), 22, 22, 4)); b++;                     // next strip's query
    // ---- anti-diagonal loop
    l0 = b;
    begin dsu_instr_t d = '0; d.reg_we = 1; d.l_unit = 0; d.l_radd = 2'd0; put_dsu(b, d); end
    put_units(b, ei(OP_LOGIC, ctl(ESZ_W), 13, 1, 0));                          // D <- U
    put(b, 0, eimm(OP_SHIFT, ctl(ESZ_W, 2'd3), 12, 9, 8)); b++;
    put_units(b, eimm(OP_SHIFT, ctl(ESZ_W, 2'd3), 12, 9, 8));
    put(b, 0, eimm(OP_SHIFT, ctl(ESZ_W, 2'd1), 16, 28, 24)); b++;             // boundary row
    put_units(b, eimm(OP_SHIFT, ctl(ESZ_W, 2'd1), 16, 30, 24, 1'b1));         // sniff
    put(b, 0, eimm(OP_IDXM, ctl(ESZ_W), 0, 17, 0)); b++;                     // next symbol
    put_all(b, ei(OP_LOGIC, ctl(ESZ_W), 1, 12, 16));                          // U
    begin
      dsu_instr_t d = '0;
      d.reg_we = 1; d.l_unit = 0; d.l_radd = 2'd3;
      d.shift_en = 1; d.shift_left = 0; d.shift_addr = 2'd3;
      put_dsu(b, d);
    end
    b++;
    put_units(b, eimm(OP_SHIFT, ctl(ESZ_W, 2'd3), 12, 23, 8));
    put(b, 0, ei(OP_IDXM, ctl(ESZ_W), 0, 17, 18)); b++;                       // F boundary
    begin dsu_instr_t d = '0; d.reg_we = 1; d.l_unit = 0; d.l_radd = 2'd0; put_dsu(b, d); end
    put_units(b, eimm(OP_SHIFT, ctl(ESZ_W, 2'd1), 16, 29, 24, 1'b1));         // sniff F
    put(b, 0, eimm(OP_SHIFT, ctl(ESZ_W, 2'd3), 12, 23, 8)); b++;
    put(b, 0, eimm(OP_SHIFT, ctl(ESZ_W, 2'd1), 16, 28, 24)); b++;
    put_all(b, ei(OP_LOGIC, ctl(ESZ_W), 23, 12, 16)); b++;                    // F from above
    put_all(b, eimm(OP_SUM, ctl(ESZ_8), 23, 23, -GE)); b++;
    put_all(b, eimm(OP_SUM, ctl(ESZ_8), 7, 7, -GE)); b++;
    put_all(b, eimm(OP_SHIFT, ctl(ESZ_W, 2'd3), 12, 5, 8)); b++;
    put_all(b, eimm(OP_SHIFT, ctl(ESZ_W, 2'd1), 16, 31, 24)); b++;
    put_all(b, ei(OP_LOGIC, ctl(ESZ_W), 5, 12, 16)); b++;
    put_all(b, ei(OP_CMP, ctl(ESZ_8), 12, 4, 5)); b++;
    put_all(b, ei(OP_MUL, ctl(ESZ_8), 12, 12, 6)); b++;
    put_all(b, eimm(OP_SUM, ctl(ESZ_8), 14, 12, MI)); b++;
    put_all(b, ei(OP_SUM, ctl(ESZ_8), 3, 1, 2, 1, 1)); b++;
    put_all(b, ei(OP_MAX, ctl(ESZ_8), 23, 23, 3)); b++;                       // F
    put_all(b, ei(OP_MAX, ctl(ESZ_8), 7, 7, 11)); b++;                        // E
    put_all(b, ei(OP_MAX, ctl(ESZ_8), 3, 7, 23)); b++;
    put_all(b, ei(OP_MAX, ctl(ESZ_8), 3, 3, 15)); b++;
    put_all(b, eimm(OP_MAX, ctl(ESZ_8), 9, 3, 0)); b++;
    put_all(b, ei(OP_MAX, ctl(ESZ_8), 8, 8, 9)); b++;
    for (int u = 0; u < N - 1; u++) put(b, u, ei(OP_LOGIC, ctl(ESZ_W), 30, 9, 0));
    put(b, N - 1, ei(OP_ST, ctl(ESZ_W), 0, 21, 9, 0)); b++;                   // boundary row out
    for (int u = 0; u < N - 1; u++) put(b, u, ei(OP_LOGIC, ctl(ESZ_W), 29, 23, 0));
    put(b, N - 1, ei(OP_ST, ctl(ESZ_W), 0, 24, 23, 0)); b++;
    put(b, 0, eimm(OP_SUM, ctl(ESZ_W), 17, 17, 1));
    put(b, 1, eimm(OP_SUM, ctl(ESZ_W), 18, 18, 1));
    put(b, 2, ei(OP_LOGIC, ctl(ESZ_W), 31, 5, 0));
    put(b, 3, eimm(OP_SUM, ctl(ESZ_W), 21, 21, 1)); b++;
    put(b, 0, ei(OP_LOGIC, ctl(ESZ_W), 31, 5, 0));
    put(b, 1, ebr(BR_NE, l0, 18, 20)); b++;
    put(b, 0, ei(OP_LOGIC, ctl(ESZ_W), 13, 1, 0));
    put(b, 1, ei(OP_LOGIC, ctl(ESZ_W), 31, 5, 0));
    put(b, 3, eimm(OP_SUM, ctl(ESZ_W), 24, 24, 1)); b++;                       // delay slot
    put(b, 0, ei(OP_IDXM, ctl(ESZ_W), 0, 17, 24)); b++;                       // delay slot
    // ---- strip loop
    put(b, 2, eimm(OP_SUM, ctl(ESZ_W), 25, 25, 1)); b++;
    put(b, 2, ebr(BR_NE, s0, 25, 26)); b += 3;
    // ---- results: running maxima through R29 to RAM by the Data Stream Unit
    put_all(b, ei(OP_LOGIC, ctl(ESZ_W), 29, 8, 0)); b++;
    for (int u = 0; u < N; u++) begin
      dsu_instr_t d = '0;
      d.mwe = 1; d.w_unit = 2'(u); d.w_radd = 2'd1; d.w_madd = MADDR_W'(OUT_BASE + u);
      put_dsu(b, d); b++;
    end
    halt_at = b;
    put(b, 0, ebr(BR_ALWAYS, halt_at, 0, 0)); b += 3;
    nb = b;
  endtask

  // ---------------- reference model (8-bit wrap-around, as the hardware) ----
  byte rs [ITER + 16];
  byte qs [];
  int  lastrow [ITER + 16];
  int  best;

  function automatic int w8(int v);
    return int'(byte'(v));
  endfunction

  task automatic reference(int qp);
    int hp [], hc [], fp [], fc [];
    hp = new[NREF]; hc = new[NREF]; fp = new[NREF]; fc = new[NREF];
    foreach (hp[j]) begin hp[j] = 0; fp[j] = 0; end
    best = 0;
    for (int i = 0; i < qp; i++) begin
      int e;
      e = 0;
      for (int j = 0; j < NREF; j++) begin
        int hl, dg, s, h, f;
        hl = (j > 0) ? hc[j-1] : 0;
        dg = (j > 0) ? hp[j-1] : 0;
        s  = (qs[i] == rs[j]) ? MA : MI;
        e  = (w8(e - GE) > w8(hl - GO)) ? w8(e - GE) : w8(hl - GO);
        f  = (w8(fp[j] - GE) > w8(hp[j] - GO)) ? w8(fp[j] - GE) : w8(hp[j] - GO);
        h = 0;
        if (e > h) h = e;
        if (f > h) h = f;
        if (w8(dg + s) > h) h = w8(dg + s);
        hc[j] = h;
        fc[j] = f;
        if (h > best) best = h;
      end
      hp = hc; fp = fc;
      hc = new[NREF]; fc = new[NREF];
    end
    foreach (hp[j]) lastrow[j] = hp[j];
  endtask

  task automatic ram_write(int a, word_t v);
    @(negedge clk); host_ram_we = 1; host_addr = RAW'(a); host_wdata = v;
    @(negedge clk); host_ram_we = 0;
  endtask
  task automatic ram_read(int a, output word_t v);
    @(negedge clk); host_ram_re = 1; host_addr = RAW'(a);
    @(negedge clk); host_ram_re = 0; #1; v = host_rdata;
  endtask

  initial begin
    int nq;
    for (int j = 0; j < ITER + 16; j++) rs[j] = (j < NREF) ? byte'($urandom_range(1, 4)) : 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build();
    for (int i = 0; i < nb; i++) begin
      @(negedge clk); host_imem_we = 1; host_imem_addr = 9'(i); host_imem_wdata = prog[i];
    end
    @(negedge clk); host_imem_we = 0;
    // the reference sequence, one symbol per word in the top byte
    for (int j = 0; j < ITER + 16; j++) ram_write(REF_BASE + j, {rs[j], 24'd0});
    nq = RUN_ALL ? 8 : 5;
    for (int w = 0; w < nq; w++) begin
      int ql, qp, cyc, nstrip;
      word_t v;
      ql = QLENS[w];
      nstrip = (ql + 15) / 16;
      qp = 16 * nstrip;
      qs = new[qp];
      foreach (qs[i]) qs[i] = (i < ql) ? byte'($urandom_range(1, 4)) : 8'd5;
      for (int i = 0; i < 10 && i < ql; i++) qs[ql / 2 + i - ((ql / 2 + 10 > ql) ? ql / 2 : 0)] = rs[100 + i];
      reference(qp);
      // data: constants, query vectors, a zero boundary row
      for (int k = 0; k < 4; k++) begin
        v[k*8 +: 8] = 8'(-GO);
      end
      ram_write(C_NG, v);
      ram_write(C_DIFF, {4{8'(MA - MI)}});
      ram_write(C_REF, REF_BASE);
      ram_write(C_ITER, ITER);
      ram_write(C_BOFF, BOUND + 15 - REF_BASE);
      ram_write(C_BOUND, BOUND);
      ram_write(C_BOFFF, BOUNDF + 15 - REF_BASE);
      ram_write(C_BOUNDF, BOUNDF);
      ram_write(C_NSTRIP, nstrip);
      for (int u = 0; u < N; u++) ram_write(C_QB + u, QBASE + u);
      for (int i = 0; i < qp / 4; i++)
        ram_write(QBASE + i, {qs[4*i+3], qs[4*i+2], qs[4*i+1], qs[4*i]});
      for (int j = 0; j < ITER + 16; j++) begin ram_write(BOUND + j, '0); ram_write(BOUNDF + j, '0); end
      // run from a clean register state
      rst_n = 0; @(negedge clk); rst_n = 1;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; run = 1;
      cyc = 0;
      while (pc != PC_W'(halt_at + 2)) begin @(posedge clk); cyc++; end
      repeat (4) @(posedge clk);
      @(negedge clk); run = 0;
      begin
        int hw_best;
        hw_best = 0;
        for (int u = 0; u < N; u++) begin
          ram_read(OUT_BASE + u, v);
          for (int k = 0; k < 4; k++)
            if (int'(signed'(v[k*8 +: 8])) > hw_best) hw_best = int'(signed'(v[k*8 +: 8]));
        end
        check($sformatf("query %0d best score", ql), 64'(hw_best), 64'(best));
        for (int j = 0; j < NREF; j += (j < 64 ? 1 : 37)) begin
          ram_read(BOUND + j + 15, v);
          check($sformatf("query %0d last row col %0d", ql, j), 64'(v[31:24]), 64'(8'(lastrow[j])));
        end
        $display("query %4d x reference %0d: best score %0d, %0d cycles, %0.3f cycles per cell",
                 ql, NREF, hw_best, cyc, real'(cyc) / (real'(ql) * real'(NREF)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
