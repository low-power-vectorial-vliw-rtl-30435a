// fu_pool: the functional units shared by all execution units, together with
// the priority access list for every shared resource.
//
// Each cycle every execution unit whose instruction needs a shared resource
// raises req with the resource class. Resources are the ALU classes (NUM_SUM
// sum units, NUM_MAX maximum units and so on) and three single ports: the RAM
// read-index port, the RAM write port and the scratchpad index port. Requests
// are granted in unit order, unit 0 first, until a class runs out; the Data
// Stream Unit has top priority on the two RAM ports (dsu_ramidx/dsu_ramwr
// take the port before any unit). A unit that is not granted keeps its
// request and the pipeline holds the bundle, which then finishes over several
// cycles, as the source prescribes for structural conflicts. The j-th granted
// unit of a class is routed to instance j of that class and its three result
// lanes come back on result. Unit-order priority and the default counts of
// each FU class are this design's choices; the source gives neither.
module fu_pool
  import vliw_pkg::*;
#(
  parameter int N_UNITS   = 4,
  parameter int NUM_SUM   = 2,
  parameter int NUM_MAX   = 2,
  parameter int NUM_MUL   = 1,
  parameter int NUM_CMP   = 2,
  parameter int NUM_SHIFT = 1,
  parameter int NUM_LOGIC = 1
) (
  input  logic [N_UNITS-1:0] req,
  input  fu_class_e          cls   [N_UNITS],
  input  logic [5:0]         opctl [N_UNITS],
  input  word_t              a     [N_UNITS][3],
  input  word_t              b     [N_UNITS][3],
  input  logic               dsu_ramidx,
  input  logic               dsu_ramwr,
  output logic [N_UNITS-1:0] grant,
  output word_t              result [N_UNITS][3],
  output logic               conflict
);
  localparam int MAXN = 4;

  function automatic int capacity(fu_class_e c, logic ramidx_busy, logic ramwr_busy);
    case (c)
      FU_SUM:    return NUM_SUM;
      FU_MAX:    return NUM_MAX;
      FU_MUL:    return NUM_MUL;
      FU_CMP:    return NUM_CMP;
      FU_SHIFT:  return NUM_SHIFT;
      FU_LOGIC:  return NUM_LOGIC;
      FU_RAMIDX: return ramidx_busy ? 0 : 1;
      FU_RAMWR:  return ramwr_busy ? 0 : 1;
      FU_SPIDX:  return 1;
      default:   return 0;
    endcase
  endfunction

  logic [7:0] slot [N_UNITS];
  word_t fa [NUM_CLASSES][MAXN][3];
  word_t fb [NUM_CLASSES][MAXN][3];
  word_t fr [NUM_CLASSES][MAXN][3];
  logic [5:0] fo [NUM_CLASSES][MAXN];

  // Priority access list: unit order, after the Data Stream Unit. A request
  // is granted when fewer earlier units asked for the same class than the
  // class has instances; slot is the instance it gets.
  always_comb begin
    grant = '0;
    for (int u = 0; u < N_UNITS; u++) begin
      slot[u] = 0;
      for (int v = 0; v < u; v++)
        if (req[v] && cls[v] == cls[u]) slot[u]++;
      grant[u] = req[u] && cls[u] != FU_NONE &&
                 32'(slot[u]) < capacity(cls[u], dsu_ramidx, dsu_ramwr);
    end
    conflict = |(req & ~grant);
  end

  // Route granted operands to FU instances.
  always_comb begin
    for (int c = 0; c < NUM_CLASSES; c++)
      for (int k = 0; k < MAXN; k++) begin
        fo[c][k] = '0;
        for (int l = 0; l < 3; l++) begin
          fa[c][k][l] = '0;
          fb[c][k][l] = '0;
        end
        for (int u = 0; u < N_UNITS; u++)
          if (grant[u] && cls[u] == fu_class_e'(c) && 32'(slot[u]) == k) begin
            fo[c][k] = opctl[u];
            fa[c][k] = a[u];
            fb[c][k] = b[u];
          end
      end
  end

  for (genvar c = 0; c < NUM_CLASSES; c++) begin : g_cls
    for (genvar k = 0; k < MAXN; k++) begin : g_inst
      localparam fu_class_e C = fu_class_e'(c);
      localparam int CNT = capacity(C, 1'b0, 1'b0);
      if (C inside {FU_SUM, FU_MAX, FU_MUL, FU_CMP, FU_SHIFT, FU_LOGIC} && k < CNT) begin : g_fu
        vec_fu #(.CLASS(C)) u_fu (.opctl(fo[c][k]), .a(fa[c][k]), .b(fb[c][k]), .r(fr[c][k]));
      end else begin : g_none
        assign fr[c][k] = '{default: '0};
      end
    end
  end

  always_comb
    for (int u = 0; u < N_UNITS; u++) begin
      result[u] = '{default: '0};
      for (int c = 0; c < NUM_CLASSES; c++)
        for (int k = 0; k < MAXN; k++)
          if (cls[u] == fu_class_e'(c) && 32'(slot[u]) == k) result[u] = fr[c][k];
    end

  initial begin
    assert (NUM_SUM <= MAXN && NUM_MAX <= MAXN && NUM_MUL <= MAXN && NUM_CMP <= MAXN &&
            NUM_SHIFT <= MAXN && NUM_LOGIC <= MAXN)
      else $error("fu_pool: at most %0d units per class", MAXN);
  end
endmodule
