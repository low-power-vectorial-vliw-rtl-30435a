// pc_jump_ctrl: program counter and jump control.
//
// The PC addresses the bundle that the instruction memory reads this cycle.
// It advances by one bundle whenever the pipeline advances (advance high)
// and holds during a structural stall or while the processor is not running.
// Every execution unit may raise a taken delayed branch from the EXECUTE
// stage; when several do in one bundle the lowest-numbered unit wins (a
// choice of this design). The redirect is applied on the cycle the bundle
// leaves EXECUTE, so the two bundles already fetched behind the branch (the
// one in DECODE and the one being fetched) still execute: two delay slots.
// start loads the PC with zero. The source names the PC and jump control and
// the delayed-branch instructions; the delay-slot count follows from its
// 4-stage pipeline with the branch resolved in EXECUTE.
module pc_jump_ctrl #(
  parameter int N_UNITS = 4,
  parameter int PC_W = 9
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            advance,
  input  logic [N_UNITS-1:0] br_taken,
  input  logic [PC_W-1:0] br_target [N_UNITS],
  output logic [PC_W-1:0] pc,
  output logic            redirect
);
  logic [PC_W-1:0] target;

  always_comb begin
    redirect = 1'b0;
    target   = '0;
    for (int u = N_UNITS - 1; u >= 0; u--)
      if (br_taken[u]) begin
        redirect = 1'b1;
        target   = br_target[u];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        pc <= '0;
    else if (start)    pc <= '0;
    else if (advance)  pc <= redirect ? target : pc + 1'b1;
  end
endmodule
