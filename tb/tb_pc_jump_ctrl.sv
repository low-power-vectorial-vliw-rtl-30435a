// tb_pc_jump_ctrl: checks that the PC counts up while the pipeline advances,
// holds while it does not, restarts at 0 on start, and on a taken delayed
// branch jumps to the target of the lowest-numbered unit that branches.
module tb_pc_jump_ctrl;
  localparam int N = 4, W = 9;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, advance = 0, redirect;
  logic [N-1:0] br_taken = '0;
  logic [W-1:0] br_target [N];
  logic [W-1:0] pc, exp_pc;

  pc_jump_ctrl #(.N_UNITS(N), .PC_W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    foreach (br_target[i]) br_target[i] = '0;
    exp_pc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      checks++;
      if (pc !== exp_pc) begin failures++; $display("FAIL pc=%0d exp=%0d", pc, exp_pc); end
      advance = ($urandom % 4) != 0;
      start = ($urandom % 50) == 0;
      br_taken = ($urandom % 3 == 0) ? N'($urandom) : '0;
      foreach (br_target[i]) br_target[i] = W'($urandom);
      if (start) exp_pc = '0;
      else if (advance) begin
        exp_pc = exp_pc + 1'b1;
        for (int u = 0; u < N; u++)
          if (br_taken[u]) begin exp_pc = br_target[u]; break; end
      end
      #1;
      checks++;
      if (redirect !== (br_taken != 0)) begin failures++; $display("FAIL redirect"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
