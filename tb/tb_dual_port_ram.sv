// tb_dual_port_ram: checks the two-step load (index, then data one cycle
// later, held until the next index), byte-enabled writes and simultaneous
// write and read on the two ports, against a shadow array.
module tb_dual_port_ram;
  localparam int D = 1024;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0, re = 0;
  logic [9:0] waddr, raddr;
  logic [3:0] wbe;
  logic [31:0] wdata, q, shadow [D], exp_q;

  dual_port_ram #(.DEPTH(D), .WIDTH(32)) dut (.*);

  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    // fill every word
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; wbe = '1; waddr = 10'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    exp_q = '0;
    for (int it = 0; it < 4000; it++) begin
      logic [31:0] old;
      @(negedge clk);
      we = $urandom; re = $urandom; wbe = $urandom; waddr = $urandom; raddr = $urandom;
      if (it % 7 == 0) raddr = waddr;
      wdata = $urandom;
      old = shadow[raddr];
      @(posedge clk); #1;
      if (re) exp_q = old;
      if (we) for (int b = 0; b < 4; b++) if (wbe[b]) shadow[waddr][b*8 +: 8] = wdata[b*8 +: 8];
      if (it > 0) begin
        checks++;
        if (q !== exp_q) begin failures++; $display("FAIL q=%h exp=%h", q, exp_q); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
