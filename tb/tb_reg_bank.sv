// tb_reg_bank: checks an execution unit's register bank against a shadow
// model: three owner write ports, memory-register writes from the Data Stream
// Unit overriding the owner, and the forwarded view that shows this cycle's
// pending writes before they are stored.
module tb_reg_bank;
  import vliw_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [2:0] we;
  logic [4:0] waddr [3];
  word_t wdata [3];
  logic [NMEMREGS-1:0] mw_en;
  word_t mw_data [NMEMREGS];
  word_t regs [NREGS], view [NREGS];
  word_t shadow [NREGS];

  reg_bank dut (.*);

  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  initial begin
    we = '0; mw_en = '0;
    foreach (waddr[i]) begin waddr[i] = '0; wdata[i] = '0; end
    foreach (mw_data[i]) mw_data[i] = '0;
    foreach (shadow[i]) shadow[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      word_t nxt [NREGS];
      @(negedge clk);
      we = $urandom; mw_en = $urandom;
      for (int p = 0; p < 3; p++) begin
        waddr[p] = $urandom; wdata[p] = $urandom;
        if (it % 4 == 0) waddr[p] = 5'(28 + p);
      end
      foreach (mw_data[m]) mw_data[m] = $urandom;
      nxt = shadow;
      for (int p = 0; p < 3; p++) if (we[p]) nxt[waddr[p]] = wdata[p];
      for (int m = 0; m < NMEMREGS; m++) if (mw_en[m]) nxt[28 + m] = mw_data[m];
      #1;
      for (int r = 0; r < NREGS; r++) begin
        check("regs before edge", regs[r], shadow[r]);
        check("view", view[r], nxt[r]);
      end
      @(posedge clk);
      shadow = nxt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
