// exec_unit: the EXECUTE-stage logic of one execution unit.
//
// It takes the unit's 32-bit slot of the bundle and
//  * reads its operands from the forwarded view of its own register bank,
//    or, when Ta/Tb is set on a non-memory instruction and the register is
//    one of R28..R31, from the memory registers of its left neighbour
//    (unit u-1): the "sniffing" path. Unit 0 has no left neighbour and always
//    reads its own bank (it gets its boundary values from memory instead);
//  * with Td set, reads three operand pairs (Ra+k, Rb+k) for k = 0, 8, 12 and
//    writes three results to Rd+k, the 3-way write used for the three sums of
//    the Smith-Waterman recursion; for loads Td writes the one loaded word to
//    the same three registers;
//  * names the shared resource it needs (cls) and hands its operands to the
//    FU pool, which may grant it in a later cycle; operands are captured in
//    the bundle's first EXECUTE cycle so that a delayed operation still sees
//    the register state from before the bundle;
//  * forms the register writes from the FU result, the RAM output (LB/LH/LD)
//    or the scratchpad output (SPAD LD), and the address / data / byte
//    enables of INDEX MADDR, INDEX SADDR and the stores;
//  * evaluates delayed branches (BRD, BEQD, BNED, BLTD, BGTD) on Ra, Rb.
// The field layout follows the published format. The opcode and OpControl
// encodings, the k = 0/8/12 spacing (read from the published example
// "SUM R(0,8,12),R(1,9,13),R(2,10,14)"), MAXMOV's second move Rd+2 <- Rb+2
// (read from "MAXMOV R0,R0,R8, mov(R2,R10)"), sniffing limited to the memory
// registers, stores addressed by Ra, and zero-extended partial loads are
// choices of this design.
module exec_unit
  import vliw_pkg::*;
#(
  parameter bit HAS_LEFT = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic       first,      // first EXECUTE cycle of this bundle
  input  logic       go,         // pipeline running this cycle
  input  eu_instr_t  instr,
  input  word_t      view     [NREGS],
  input  word_t      left_mem [NMEMREGS],
  input  word_t      ram_q,
  input  word_t      spad_q,
  input  word_t      fu_result [3],
  // towards the FU pool / memory ports
  output fu_class_e  cls,
  output logic       need,
  output word_t      a [3],
  output word_t      b [3],
  output word_t      mem_addr,
  output word_t      st_data,
  output logic [VEC_W/8-1:0] st_be,
  // write-back
  output logic [2:0] wb_we,
  output logic [4:0] wb_addr [3],
  output word_t      wb_data [3],
  // branch
  output logic       br_taken,
  output logic [PC_W-1:0] br_target,
  output logic       sniffed
);
  localparam logic [4:0] OFF [3] = '{5'd0, 5'd8, 5'd12};

  opcode_e op;
  logic is_mem, use_imm;
  word_t a_live [3], b_live [3], a_q [3], b_q [3];
  logic sniff_a, sniff_b;

  assign op      = opcode_e'(instr.opcode);
  assign is_mem  = op inside {OP_LD, OP_SPLD, OP_ST};
  assign use_imm = instr.opctl[0] && !is_mem && op != OP_BR;
  assign cls     = class_of(instr.opcode);
  assign need    = valid && op != OP_NOP;

  function automatic word_t part(word_t w, logic [1:0] size, logic ta, logic tb);
    case (size)
      2'd1:    return word_t'(w[{ta, tb}*8 +: 8]);
      2'd2:    return word_t'(w[ta*16 +: 16]);
      default: return w;
    endcase
  endfunction

  always_comb begin
    sniff_a = 1'b0;
    sniff_b = 1'b0;
    for (int k = 0; k < 3; k++) begin
      logic [4:0] ra_k, rb_k;
      ra_k = instr.ra + OFF[k];
      rb_k = (op == OP_MAXMOV && k == 1) ? instr.rb + 5'd2 : instr.rb + OFF[k];
      a_live[k] = view[ra_k];
      if (HAS_LEFT && instr.ta && !is_mem && ra_k >= 5'(MEMREG_BASE)) begin
        a_live[k] = left_mem[ra_k[1:0]];
        sniff_a = 1'b1;
      end
      b_live[k] = view[rb_k];
      if (HAS_LEFT && instr.tb && !is_mem && !use_imm && rb_k >= 5'(MEMREG_BASE)) begin
        b_live[k] = left_mem[rb_k[1:0]];
        sniff_b = 1'b1;
      end
      if (use_imm) b_live[k] = imm_vec({instr.tb, instr.rb}, instr.opctl);
    end
    sniffed = valid && first && (sniff_a || sniff_b);
  end

  // Operand capture for operations held by a structural conflict.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '{default: '0};
      b_q <= '{default: '0};
    end else if (go && first) begin
      a_q <= a_live;
      b_q <= b_live;
    end
  end

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      a[k] = first ? a_live[k] : a_q[k];
      b[k] = first ? b_live[k] : b_q[k];
    end
  end

  // Memory-port side.
  always_comb begin
    mem_addr = a[0] + b[0];
    if (op == OP_ST) mem_addr = a[0];
    st_data = b[0];
    case (instr.opctl[3:2])
      2'd1:    st_be = 4'(1 << {instr.ta, instr.tb});
      2'd2:    st_be = instr.ta ? 4'b1100 : 4'b0011;
      default: st_be = '1;
    endcase
  end

  // Write-back.
  always_comb begin
    word_t ld;
    wb_we   = '0;
    for (int k = 0; k < 3; k++) begin
      wb_addr[k] = instr.rd + OFF[k];
      wb_data[k] = fu_result[k];
    end
    ld = part(op == OP_SPLD ? spad_q : ram_q, instr.opctl[3:2], instr.ta, instr.tb);
    case (op)
      OP_SUM, OP_MAX, OP_MUL, OP_CMP, OP_SHIFT, OP_LOGIC:
        wb_we = instr.td ? 3'b111 : 3'b001;
      OP_MAXMOV: begin
        wb_we      = 3'b011;
        wb_addr[1] = instr.rd + 5'd2;
        wb_data[1] = b[1];
      end
      OP_LD, OP_SPLD: begin
        wb_we = instr.td ? 3'b111 : 3'b001;
        for (int k = 0; k < 3; k++) wb_data[k] = ld;
      end
      default: wb_we = '0;
    endcase
    if (!instr.we || !valid) wb_we = '0;
  end

  // Delayed branches.
  always_comb begin
    logic cond;
    case (brcond_e'(instr.opctl[2:0]))
      BR_ALWAYS: cond = 1'b1;
      BR_EQ:     cond = a[0] == b[0];
      BR_NE:     cond = a[0] != b[0];
      BR_LT:     cond = $signed(a[0]) < $signed(b[0]);
      BR_GT:     cond = $signed(a[0]) > $signed(b[0]);
      default:   cond = 1'b0;
    endcase
    br_taken  = valid && op == OP_BR && cond;
    br_target = {instr.opctl[5:3], instr.td, instr.rd};
  end
endmodule
