// tb_vec_fu: checks the Sum, Maximum, Shift, Logic, Compare and Multiply
// functional units against per-element reference arithmetic written out here
// for 8-bit, 16-bit and 32-bit element sizes, with random operands.
module tb_vec_fu;
  import vliw_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [5:0] opctl;
  word_t a [3], b [3];
  word_t r_sum [3], r_max [3], r_sh [3], r_lg [3], r_cmp [3], r_mul [3];

  vec_fu #(.CLASS(FU_SUM))   u_sum (.opctl, .a, .b, .r(r_sum));
  vec_fu #(.CLASS(FU_MAX))   u_max (.opctl, .a, .b, .r(r_max));
  vec_fu #(.CLASS(FU_SHIFT)) u_sh  (.opctl, .a, .b, .r(r_sh));
  vec_fu #(.CLASS(FU_LOGIC)) u_lg  (.opctl, .a, .b, .r(r_lg));
  vec_fu #(.CLASS(FU_CMP))   u_cmp (.opctl, .a, .b, .r(r_cmp));
  vec_fu #(.CLASS(FU_MUL))   u_mul (.opctl, .a, .b, .r(r_mul));

  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s opctl=%b a=%h b=%h got=%h exp=%h", what, opctl, a[0], b[0], got, exp);
    end
  endtask

  initial begin
    for (int it = 0; it < 400; it++) begin
      word_t es, ex_sum, ex_sub, ex_max, ex_umax, ex_sra, ex_sll, ex_and, ex_eq, ex_mul;
      for (int l = 0; l < 3; l++) begin a[l] = $urandom; b[l] = $urandom; end
      if (it % 5 == 0) b[0] = a[0];
      // 8-bit elements
      for (int i = 0; i < 4; i++) begin
        byte sa, sb; byte unsigned ua, ub;
        sa = a[0][i*8 +: 8]; sb = b[0][i*8 +: 8]; ua = sa; ub = sb;
        ex_sum[i*8 +: 8]  = 8'(ua + ub);
        ex_sub[i*8 +: 8]  = 8'(ua - ub);
        ex_max[i*8 +: 8]  = (sa > sb) ? ua : ub;
        ex_umax[i*8 +: 8] = (ua > ub) ? ua : ub;
        ex_sra[i*8 +: 8]  = 8'(sa >>> (ub % 8));
        ex_sll[i*8 +: 8]  = 8'(ua << (ub % 8));
        ex_eq[i*8 +: 8]   = (ua == ub) ? 8'd1 : 8'd0;
        ex_mul[i*8 +: 8]  = 8'(ua * ub);
      end
      ex_and = a[0] & b[0];
      opctl = {2'd0, 2'd0, 1'b0, 1'b0}; #1;
      check("sum8", r_sum[0], ex_sum); check("max8", r_max[0], ex_max);
      check("sra8", r_sh[0], ex_sra);  check("or", r_lg[0], a[0] | b[0]);
      check("eq8", r_cmp[0], ex_eq);   check("mul8", r_mul[0], ex_mul);
      opctl = {2'd0, 2'd1, 1'b1, 1'b0}; #1;
      check("sub8", r_sum[0], ex_sub); check("umax8", r_max[0], ex_umax);
      check("and", r_lg[0], ex_and);
      opctl = {2'd0, 2'd3, 1'b0, 1'b0}; #1;
      check("sll8", r_sh[0], ex_sll);
      // 16-bit elements
      opctl = {2'd1, 2'd0, 1'b0, 1'b0}; #1;
      for (int i = 0; i < 2; i++) begin
        shortint sa, sb;
        sa = a[0][i*16 +: 16]; sb = b[0][i*16 +: 16];
        es[i*16 +: 16] = 16'(a[0][i*16 +: 16] + b[0][i*16 +: 16]);
        ex_max[i*16 +: 16] = (sa > sb) ? a[0][i*16 +: 16] : b[0][i*16 +: 16];
      end
      check("sum16", r_sum[0], es); check("max16", r_max[0], ex_max);
      // scalar (one 32-bit element)
      opctl = {2'd2, 2'd0, 1'b0, 1'b0}; #1;
      check("sum32", r_sum[0], a[0] + b[0]);
      check("max32", r_max[0], ($signed(a[0]) > $signed(b[0])) ? a[0] : b[0]);
      // the other two lanes are computed as well
      check("lane1", r_sum[1], a[1] + b[1]); check("lane2", r_sum[2], a[2] + b[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
