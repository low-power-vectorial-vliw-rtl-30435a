// vliw_top: hybrid vector/VLIW processor for dynamic-programming kernels.
//
// One bundle per cycle is fetched from the instruction memory: a 35-bit Data
// Stream Unit slot plus one 32-bit slot per execution unit. Each execution
// unit works on 32-bit vectors (4 x 8-bit cells) in its own register bank, so
// the bundle computes different instructions on different vectors: ILP across
// the units, DLP inside each vector. The units share a pool of functional
// units, a dual-port RAM (one write, one read port) and a load-only
// scratchpad; the Data Stream Unit moves data between the RAM and the units'
// memory registers in parallel and has priority on the RAM ports.
//
// Pipeline, 4 stages:
//   FETCH     instr_mem reads the bundle at pc (synchronous read);
//   DECODE    the bundle is split into typed slots and registered;
//   EXECUTE   operands are read from each bank's forwarded view, the FU pool
//             grants shared resources, memories are indexed / read, branches
//             are evaluated; a structural conflict holds the bundle (and the
//             front end) until every slot has been served;
//   WRITE-BACK the results are written into the register banks.
// Forwarding: EXECUTE reads the register view that already contains the
// writes in WRITE-BACK, so dependent bundles issue back to back. Branches
// are delayed with two delay slots.
//
// Host interface (used while run is low): host_imem_* loads bundles,
// host_ram_we / host_spad_we write the RAM / scratchpad at host_addr, and
// host_ram_re reads the RAM (host_rdata valid one cycle later). start sets
// the PC to 0 and empties the pipeline; run lets it execute. pc is the fetch
// address; evt reports one pulse per occurrence of each mechanism.
// The stage split, the priority rules and the memories follow the source; the
// host interface, the event outputs and the reset values are this design's.
module vliw_top
  import vliw_pkg::*;
#(
  parameter int N_UNITS    = 4,
  parameter int IMEM_DEPTH = 512,
  parameter int RAM_DEPTH  = 1024,
  parameter int SPAD_DEPTH = 256,
  parameter int SPAD_BASE  = 768,
  parameter int NUM_SUM    = 2,
  parameter int NUM_MAX    = 2,
  parameter int NUM_MUL    = 1,
  parameter int NUM_CMP    = 2,
  parameter int NUM_SHIFT  = 1,
  parameter int NUM_LOGIC  = 1,
  localparam int BUNDLE_W  = DSU_INSTR_W + N_UNITS * EU_INSTR_W,
  localparam int IAW       = $clog2(IMEM_DEPTH),
  localparam int RAW       = $clog2(RAM_DEPTH),
  localparam int SAW       = $clog2(SPAD_DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                run,
  input  logic                host_imem_we,
  input  logic [IAW-1:0]      host_imem_addr,
  input  logic [BUNDLE_W-1:0] host_imem_wdata,
  input  logic                host_ram_we,
  input  logic                host_spad_we,
  input  logic                host_ram_re,
  input  logic [RAW-1:0]      host_addr,
  input  word_t               host_wdata,
  output word_t               host_rdata,
  output logic [PC_W-1:0]     pc,
  output evt_t                evt
);
  // ---------------- FETCH ----------------
  logic                advance, stall;
  logic [BUNDLE_W-1:0] imem_q;
  logic                d_valid;
  logic [N_UNITS-1:0]  br_taken;
  logic [PC_W-1:0]     br_target [N_UNITS];
  logic                redirect;

  assign advance = run && !stall;

  pc_jump_ctrl #(.N_UNITS(N_UNITS), .PC_W(PC_W)) u_pc (
    .clk, .rst_n, .start, .advance, .br_taken, .br_target, .pc, .redirect);

  instr_mem #(.DEPTH(IMEM_DEPTH), .WIDTH(BUNDLE_W)) u_imem (
    .clk, .en(advance), .addr(pc[IAW-1:0]), .q(imem_q),
    .we(host_imem_we), .waddr(host_imem_addr), .wdata(host_imem_wdata));

  // ---------------- DECODE ----------------
  eu_instr_t  ex_eu [N_UNITS];
  dsu_instr_t ex_dsu;
  logic       ex_valid, ex_first;
  logic [N_UNITS-1:0] done, complete;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid  <= 1'b0;
      ex_valid <= 1'b0;
      ex_first <= 1'b0;
      done     <= '0;
      ex_dsu   <= '0;
      ex_eu    <= '{default: '0};
    end else if (start) begin
      d_valid  <= 1'b0;
      ex_valid <= 1'b0;
      ex_first <= 1'b0;
      done     <= '0;
    end else if (advance) begin
      d_valid  <= 1'b1;
      ex_valid <= d_valid;
      ex_first <= 1'b1;
      done     <= '0;
      ex_dsu   <= dsu_instr_t'(imem_q[DSU_INSTR_W-1:0]);
      for (int u = 0; u < N_UNITS; u++)
        ex_eu[u] <= eu_instr_t'(imem_q[DSU_INSTR_W + u*EU_INSTR_W +: EU_INSTR_W]);
    end else if (run) begin
      ex_first <= 1'b0;
      done     <= done | complete;
    end
  end

  // ---------------- EXECUTE ----------------
  word_t      regs [N_UNITS][NREGS];
  word_t      view [N_UNITS][NREGS];
  word_t      mem_view [N_UNITS][NMEMREGS];
  word_t      mem_regs [N_UNITS][NMEMREGS];
  word_t      ram_q, spad_q;
  fu_class_e  cls [N_UNITS];
  logic [N_UNITS-1:0] need, req, grant, sniffed;
  logic [5:0] opctl [N_UNITS];
  word_t      fa [N_UNITS][3];
  word_t      fb [N_UNITS][3];
  word_t      fres [N_UNITS][3];
  word_t      mem_addr [N_UNITS];
  word_t      st_data [N_UNITS];
  logic [VEC_W/8-1:0] st_be [N_UNITS];
  logic [2:0] eu_we [N_UNITS];
  logic [4:0] eu_waddr [N_UNITS][3];
  word_t      eu_wdata [N_UNITS][3];
  logic       fu_conflict;

  always_comb
    for (int u = 0; u < N_UNITS; u++)
      for (int m = 0; m < NMEMREGS; m++) begin
        mem_view[u][m] = view[u][MEMREG_BASE + m];
        mem_regs[u][m] = regs[u][MEMREG_BASE + m];
      end

  for (genvar u = 0; u < N_UNITS; u++) begin : g_unit
    exec_unit #(.HAS_LEFT(u > 0)) u_eu (
      .clk, .rst_n,
      .valid(ex_valid), .first(ex_first), .go(run),
      .instr(ex_eu[u]), .view(view[u]),
      .left_mem(mem_view[(u > 0) ? u - 1 : 0]),
      .ram_q, .spad_q, .fu_result(fres[u]),
      .cls(cls[u]), .need(need[u]), .a(fa[u]), .b(fb[u]),
      .mem_addr(mem_addr[u]), .st_data(st_data[u]), .st_be(st_be[u]),
      .wb_we(eu_we[u]), .wb_addr(eu_waddr[u]), .wb_data(eu_wdata[u]),
      .br_taken(br_taken[u]), .br_target(br_target[u]), .sniffed(sniffed[u]));
    assign opctl[u] = ex_eu[u].opctl;
    assign req[u]   = need[u] && !done[u] && cls[u] != FU_NONE;
    assign complete[u] = run && need[u] && !done[u] && (cls[u] == FU_NONE || grant[u]);
  end

  // Data Stream Unit
  logic dsu_go, dsu_idx_en, dsu_ram_wr, dsu_spad_wr;
  logic [MADDR_W-1:0] dsu_idx_addr, dsu_wr_addr;
  word_t dsu_wr_data;
  logic [NMEMREGS-1:0] mw_en [N_UNITS];
  word_t mw_data [N_UNITS][NMEMREGS];
  logic evt_ld, evt_st, evt_sh;

  assign dsu_go = run && ex_valid && ex_first;

  data_stream_unit #(.N_UNITS(N_UNITS), .SPAD_BASE(SPAD_BASE), .SPAD_DEPTH(SPAD_DEPTH)) u_dsu (
    .clk, .rst_n, .go(dsu_go), .instr(ex_dsu),
    .mem_view, .mem_regs, .ram_q,
    .ram_idx_en(dsu_idx_en), .ram_idx_addr(dsu_idx_addr),
    .ram_wr_en(dsu_ram_wr), .spad_wr_en(dsu_spad_wr),
    .wr_addr(dsu_wr_addr), .wr_data(dsu_wr_data),
    .mw_en, .mw_data,
    .evt_load(evt_ld), .evt_store(evt_st), .evt_shift(evt_sh));

  fu_pool #(.N_UNITS(N_UNITS), .NUM_SUM(NUM_SUM), .NUM_MAX(NUM_MAX), .NUM_MUL(NUM_MUL),
            .NUM_CMP(NUM_CMP), .NUM_SHIFT(NUM_SHIFT), .NUM_LOGIC(NUM_LOGIC)) u_fus (
    .req, .cls, .opctl, .a(fa), .b(fb),
    .dsu_ramidx(dsu_idx_en), .dsu_ramwr(dsu_ram_wr),
    .grant, .result(fres), .conflict(fu_conflict));

  assign stall = ex_valid && fu_conflict;

  // Memory ports: the Data Stream Unit first, then the granted unit.
  logic               ram_re, ram_we, spad_re, spad_we;
  logic [RAW-1:0]     ram_raddr, ram_waddr;
  logic [VEC_W/8-1:0] ram_wbe;
  word_t              ram_wdata, spad_wdata;
  logic [SAW-1:0]     spad_raddr, spad_waddr;

  always_comb begin
    ram_re = 1'b0; ram_raddr = '0;
    ram_we = 1'b0; ram_waddr = '0; ram_wbe = '0; ram_wdata = '0;
    spad_re = 1'b0; spad_raddr = '0;
    spad_we = 1'b0; spad_waddr = '0; spad_wdata = '0;
    if (!run) begin
      ram_re = host_ram_re;  ram_raddr = host_addr;
      ram_we = host_ram_we;  ram_waddr = host_addr; ram_wbe = '1; ram_wdata = host_wdata;
      spad_we = host_spad_we; spad_waddr = SAW'(host_addr); spad_wdata = host_wdata;
    end else begin
      for (int u = N_UNITS - 1; u >= 0; u--) begin
        if (grant[u] && cls[u] == FU_RAMIDX) begin
          ram_re = 1'b1; ram_raddr = RAW'(mem_addr[u]);
        end
        if (grant[u] && cls[u] == FU_RAMWR) begin
          ram_we = 1'b1; ram_waddr = RAW'(mem_addr[u]);
          ram_wbe = st_be[u]; ram_wdata = st_data[u];
        end
        if (grant[u] && cls[u] == FU_SPIDX) begin
          spad_re = 1'b1; spad_raddr = SAW'(mem_addr[u]);
        end
      end
      if (dsu_idx_en) begin
        ram_re = 1'b1; ram_raddr = RAW'(dsu_idx_addr);
      end
      if (dsu_ram_wr) begin
        ram_we = 1'b1; ram_waddr = RAW'(dsu_wr_addr); ram_wbe = '1; ram_wdata = dsu_wr_data;
      end
      if (dsu_spad_wr) begin
        spad_we = 1'b1; spad_waddr = SAW'(32'(dsu_wr_addr) - 32'(SPAD_BASE));
        spad_wdata = dsu_wr_data;
      end
    end
  end

  dual_port_ram #(.DEPTH(RAM_DEPTH), .WIDTH(VEC_W)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wbe(ram_wbe), .wdata(ram_wdata),
    .re(ram_re), .raddr(ram_raddr), .q(ram_q));

  scratchpad_mem #(.DEPTH(SPAD_DEPTH), .WIDTH(VEC_W)) u_spad (
    .clk, .we(spad_we), .waddr(spad_waddr), .wdata(spad_wdata),
    .re(spad_re), .raddr(spad_raddr), .q(spad_q));

  assign host_rdata = ram_q;

  // ---------------- WRITE-BACK ----------------
  logic [2:0] wb_we [N_UNITS];
  logic [4:0] wb_addr [N_UNITS][3];
  word_t      wb_data [N_UNITS][3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_we   <= '{default: '0};
      wb_addr <= '{default: '0};
      wb_data <= '{default: '0};
    end else begin
      for (int u = 0; u < N_UNITS; u++) begin
        wb_we[u]   <= complete[u] ? eu_we[u] : 3'b000;
        wb_addr[u] <= eu_waddr[u];
        wb_data[u] <= eu_wdata[u];
      end
    end
  end

  for (genvar u = 0; u < N_UNITS; u++) begin : g_bank
    reg_bank u_rb (
      .clk, .rst_n,
      .we(wb_we[u]), .waddr(wb_addr[u]), .wdata(wb_data[u]),
      .mw_en(mw_en[u]), .mw_data(mw_data[u]),
      .regs(regs[u]), .view(view[u]));
  end

  // ---------------- mechanism events ----------------
  always_comb begin
    evt = '0;
    evt.issue      = run && ex_valid && ex_first;
    evt.stall      = run && stall;
    evt.branch     = advance && ex_valid && redirect;
    evt.dsu_load   = evt_ld;
    evt.dsu_store  = evt_st;
    evt.dsu_shift  = evt_sh;
    evt.spad_write = dsu_spad_wr;
    evt.sniff      = run && |sniffed;
    for (int u = 0; u < N_UNITS; u++) begin
      if (complete[u] && ex_eu[u].td && eu_we[u] == 3'b111) evt.broadcast = 1'b1;
      if (run && ex_valid && !done[u] && need[u] && !grant[u] &&
          ((cls[u] == FU_RAMIDX && dsu_idx_en) || (cls[u] == FU_RAMWR && dsu_ram_wr)))
        evt.dsu_priority = 1'b1;
      if (run && ex_valid && ex_first && need[u])
        for (int k = 0; k < 3; k++)
          if (wb_we[u][k] && (wb_addr[u][k] == ex_eu[u].ra || wb_addr[u][k] == ex_eu[u].rb))
            evt.forward = 1'b1;
    end
  end

  // A granted RAM port is never shared with the Data Stream Unit.
  always_ff @(posedge clk)
    if (run) begin
      for (int u = 0; u < N_UNITS; u++) begin
        assert (!(dsu_idx_en && grant[u] && cls[u] == FU_RAMIDX))
          else $error("RAM read port granted to unit %0d while the Data Stream Unit indexes", u);
        assert (!(dsu_ram_wr && grant[u] && cls[u] == FU_RAMWR))
          else $error("RAM write port granted to unit %0d while the Data Stream Unit writes", u);
      end
    end
endmodule
