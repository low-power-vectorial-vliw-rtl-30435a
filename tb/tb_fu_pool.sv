// tb_fu_pool: checks the priority access list and operand routing of the
// shared functional-unit pool: grants in unit order up to the number of units
// of each class, Data Stream Unit priority on the RAM ports, a single
// scratchpad index port, and that each granted unit gets its own result.
module tb_fu_pool;
  import vliw_pkg::*;
  localparam int N = 4;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [N-1:0] req, grant;
  fu_class_e cls [N];
  logic [5:0] opctl [N];
  word_t a [N][3], b [N][3], result [N][3];
  logic dsu_ramidx, dsu_ramwr, conflict;

  fu_pool #(.N_UNITS(N), .NUM_SUM(2), .NUM_MAX(1), .NUM_MUL(1), .NUM_CMP(1),
            .NUM_SHIFT(1), .NUM_LOGIC(1)) dut (.*);

  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  function automatic logic [N-1:0] ref_grant(logic [N-1:0] rq);
    int used [NUM_CLASSES];
    logic [N-1:0] g = '0;
    int cap;
    foreach (used[i]) used[i] = 0;
    for (int u = 0; u < N; u++) begin
      case (cls[u])
        FU_SUM: cap = 2; FU_RAMIDX: cap = dsu_ramidx ? 0 : 1;
        FU_RAMWR: cap = dsu_ramwr ? 0 : 1; FU_NONE: cap = 0; default: cap = 1;
      endcase
      if (rq[u] && used[cls[u]] < cap) begin g[u] = 1; used[cls[u]]++; end
    end
    return g;
  endfunction

  initial begin
    for (int it = 0; it < 2000; it++) begin
      logic [N-1:0] eg;
      for (int u = 0; u < N; u++) begin
        cls[u] = fu_class_e'($urandom_range(0, 9));
        if (it < 10) cls[u] = FU_SUM;
        opctl[u] = 6'd0;
        for (int l = 0; l < 3; l++) begin a[u][l] = $urandom; b[u][l] = $urandom; end
      end
      req = $urandom; if (it < 10) req = '1;
      for (int u = 0; u < N; u++) if (cls[u] == FU_NONE) req[u] = 0;
      dsu_ramidx = $urandom; dsu_ramwr = $urandom;
      #1;
      eg = ref_grant(req);
      check("grant", 64'(grant), 64'(eg));
      check("conflict", 64'(conflict), 64'(|(req & ~eg)));
      for (int u = 0; u < N; u++)
        if (eg[u] && cls[u] == FU_SUM)
          for (int l = 0; l < 3; l++) begin
            word_t e;
            for (int i = 0; i < 4; i++) e[i*8 +: 8] = a[u][l][i*8 +: 8] + b[u][l][i*8 +: 8];
            check("sum result", 64'(result[u][l]), 64'(e));
          end
        else if (eg[u] && cls[u] == FU_LOGIC)
          check("or result", 64'(result[u][0]), 64'(a[u][0] | b[u][0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
