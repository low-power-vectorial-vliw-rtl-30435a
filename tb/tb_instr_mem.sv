// tb_instr_mem: checks that bundles written through the load port are read
// back one cycle after the fetch enable and that the output holds while the
// enable is low (the pipeline's hold during a stall).
module tb_instr_mem;
  localparam int D = 512, W = 163;
  int checks = 0, failures = 0;
  logic clk = 0, en = 0, we = 0;
  logic [8:0] addr, waddr;
  logic [W-1:0] q, wdata, shadow [D], exp_q;

  instr_mem #(.DEPTH(D), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    addr = '0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; waddr = 9'(i);
      wdata = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      shadow[i] = wdata;
    end
    @(negedge clk); we = 0; en = 1; addr = 0;
    @(posedge clk); #1; exp_q = shadow[0];
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      checks++;
      if (q !== exp_q) begin failures++; $display("FAIL q=%h exp=%h", q, exp_q); end
      en = $urandom; addr = $urandom;
      if (en) exp_q = shadow[addr];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
