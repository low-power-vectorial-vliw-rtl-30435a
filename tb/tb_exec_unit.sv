// tb_exec_unit: checks one execution unit (with a left neighbour) in
// isolation: operand selection (own bank, sniffed neighbour memory registers,
// immediates, the three Td operand pairs), the capture of operands for a
// held operation, write-back formation for ALU results, MAXMOV, LD/LB/LH and
// SPAD LD, the store and index addresses, and the delayed-branch decision.
module tb_exec_unit;
  import vliw_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, valid = 1, first = 1, go = 1;
  eu_instr_t instr;
  word_t view [NREGS], left_mem [NMEMREGS], ram_q, spad_q, fu_result [3];
  fu_class_e cls;
  logic need, br_taken, sniffed;
  word_t a [3], b [3], mem_addr, st_data;
  logic [3:0] st_be;
  logic [2:0] wb_we;
  logic [4:0] wb_addr [3];
  word_t wb_data [3];
  logic [PC_W-1:0] br_target;

  exec_unit #(.HAS_LEFT(1'b1)) dut (.*);

  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  function automatic eu_instr_t mk(opcode_e op, logic [5:0] ctl, logic [4:0] rd, logic [4:0] ra,
                                   logic [4:0] rb, logic we = 1, logic td = 0, logic ta = 0, logic tb = 0);
    return '{we: we, td: td, rd: rd, ta: ta, ra: ra, tb: tb, rb: rb, opcode: op, opctl: ctl};
  endfunction

  initial begin
    foreach (view[i]) view[i] = 32'h0101_0000 * 32'(i) + 32'(i);
    foreach (left_mem[i]) left_mem[i] = 32'hAA00_0000 + 32'(i);
    foreach (fu_result[i]) fu_result[i] = 32'h5000_0000 + 32'(i);
    ram_q = 32'h8877_6655; spad_q = 32'h4433_2211;
    instr = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      logic [4:0] rd, ra, rb;
      @(negedge clk);
      foreach (view[i]) view[i] = $urandom;
      rd = $urandom; ra = 5'($urandom_range(0, 19)); rb = 5'($urandom_range(0, 17));
      first = 1;
      // three-way SUM
      instr = mk(OP_SUM, 6'd0, rd, ra, rb, 1, 1); #1;
      check("cls", 64'(cls), 64'(FU_SUM)); check("need", 64'(need), 1);
      for (int k = 0; k < 3; k++) begin
        int off; off = (k == 0) ? 0 : (k == 1) ? 8 : 12;
        check("a td", 64'(a[k]), 64'(view[5'(ra + off)]));
        check("b td", 64'(b[k]), 64'(view[5'(rb + off)]));
        check("wb addr td", 64'(wb_addr[k]), 64'(5'(rd + off)));
        check("wb data td", 64'(wb_data[k]), 64'(fu_result[k]));
      end
      check("wb we td", 64'(wb_we), 64'(3'b111));
      // immediate: {Tb,Rb} = -3 replicated in 8-bit elements
      instr = mk(OP_SUM, 6'b00_00_0_1, rd, ra, 5'b11101, 1, 0, 0, 1); #1;
      check("imm", 64'(b[0]), 64'(32'hFDFD_FDFD));
      check("wb we single", 64'(wb_we), 64'(3'b001));
      // sniffing a memory register of the left neighbour
      instr = mk(OP_MAX, 6'd0, rd, 5'd29, 5'd30, 1, 0, 1, 0); #1;
      check("sniff a", 64'(a[0]), 64'(left_mem[1]));
      check("own b", 64'(b[0]), 64'(view[30]));
      check("sniffed", 64'(sniffed), 1);
      // MAXMOV moves Rb+2 to Rd+2
      instr = mk(OP_MAXMOV, 6'd0, 5'd0, 5'd0, 5'd8); #1;
      check("maxmov we", 64'(wb_we), 64'(3'b011));
      check("maxmov addr", 64'(wb_addr[1]), 2);
      check("maxmov data", 64'(wb_data[1]), 64'(view[10]));
      // loads
      instr = mk(OP_LD, 6'd0, rd, ra, rb); #1;
      check("ld", 64'(wb_data[0]), 64'(ram_q));
      instr = mk(OP_LD, 6'b00_01_00, rd, ra, rb, 1, 0, 1, 0); #1;   // LB, byte 2
      check("lb", 64'(wb_data[0]), 64'(32'h77));
      instr = mk(OP_LD, 6'b00_10_00, rd, ra, rb, 1, 1, 1, 0); #1;   // LH, upper half, broadcast
      check("lh", 64'(wb_data[2]), 64'(32'h8877));
      check("lh bcast", 64'(wb_we), 64'(3'b111));
      instr = mk(OP_SPLD, 6'd0, rd, ra, rb); #1;
      check("spld", 64'(wb_data[0]), 64'(spad_q));
      check("spld cls", 64'(cls), 64'(FU_NONE));
      // index and store
      instr = mk(OP_IDXM, 6'd0, rd, ra, rb, 0); #1;
      check("idx addr", 64'(mem_addr), 64'(word_t'(view[ra] + view[rb])));
      check("idx no wb", 64'(wb_we), 0);
      check("idx cls", 64'(cls), 64'(FU_RAMIDX));
      instr = mk(OP_ST, 6'b00_01_00, rd, ra, rb, 0, 0, 1, 1); #1;    // SB byte 3
      check("st addr", 64'(mem_addr), 64'(view[ra]));
      check("st data", 64'(st_data), 64'(view[rb]));
      check("st be", 64'(st_be), 64'(4'b1000));
      // branches
      instr = mk(OP_BR, 6'b101_001, 5'd7, ra, ra, 0, 1); #1;          // BEQD Ra,Ra
      check("beq taken", 64'(br_taken), 1);
      check("br target", 64'(br_target), 64'({3'b101, 1'b1, 5'd7}));
      instr = mk(OP_BR, 6'b000_010, 5'd7, ra, ra, 0); #1;             // BNED Ra,Ra
      check("bne not taken", 64'(br_taken), 0);
      instr = mk(OP_BR, 6'b000_011, 5'd7, ra, rb, 0); #1;             // BLTD
      check("blt", 64'(br_taken), 64'($signed(view[ra]) < $signed(view[rb])));
      // operand capture: hold a SUM, change the bank, operands stay
      instr = mk(OP_SUM, 6'd0, rd, ra, rb); first = 1;
      @(posedge clk); #1; first = 0;
      begin
        word_t olda;
        olda = view[ra];
        view[ra] = ~view[ra]; #1;
        check("held operand", 64'(a[0]), 64'(olda));
      end
      // write enable clear
      instr = mk(OP_SUM, 6'd0, rd, ra, rb, 0); first = 1; #1;
      check("no we", 64'(wb_we), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
