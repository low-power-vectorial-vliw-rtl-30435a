// vliw_pkg: types and constants shared by the hybrid vector/VLIW processor.
//
// The field layout of the 32-bit execution-unit instruction and of the 35-bit
// Data Stream Unit instruction follows the published instruction formats bit
// for bit. The opcode numbering, the meaning of the OpControl bits and the
// functional-unit class list are this design's own choices (the source only
// names the instructions). The element-wise arithmetic used by every
// functional unit lives here as a function so that testbenches and RTL share
// one definition of an instruction's meaning.
package vliw_pkg;

  // Datapath width: one register / memory word = 4 elements of 8 bits.
  localparam int VEC_W      = 32;
  localparam int EU_INSTR_W = 32;
  localparam int DSU_INSTR_W = 35;
  localparam int NREGS      = 32;   // 28 private + 4 memory registers
  localparam int NMEMREGS   = 4;
  localparam int MEMREG_BASE = 28;  // R28..R31 are the memory registers
  localparam int MADDR_W    = 10;   // Madd fields of the Data Stream instruction
  localparam int PC_W       = 9;    // width of a branch target

  typedef logic [VEC_W-1:0] word_t;

  // Opcode field (7 bits).
  typedef enum logic [6:0] {
    OP_NOP    = 7'd0,
    OP_SUM    = 7'd1,   // SUM / SUB (OpControl sub = 1)
    OP_MAX    = 7'd2,
    OP_MAXMOV = 7'd3,   // Rd <- max(Ra,Rb) and R(d+2) <- R(b+2)
    OP_MUL    = 7'd4,
    OP_CMP    = 7'd5,
    OP_SHIFT  = 7'd6,   // SRA, SRL, SLA, SLL
    OP_LOGIC  = 7'd7,   // OR, AND, XOR
    OP_LD     = 7'd8,   // LB, LH, LD from the RAM read port
    OP_IDXM   = 7'd9,   // INDEX MADDR: present Ra+Rb to the RAM read port
    OP_IDXS   = 7'd10,  // INDEX SADDR: present Ra+Rb to the scratchpad
    OP_SPLD   = 7'd11,  // SPAD LD
    OP_ST     = 7'd12,  // SB, SH, SD: RAM[Ra] <- Rb
    OP_BR     = 7'd13   // BRD, BEQD, BNED, BLTD, BGTD
  } opcode_e;

  // OpControl (6 bits): [0] immediate, [1] unsigned, [3:2] sub-operation,
  // [5:4] element size. For branches [2:0] is the condition and [5:3] the
  // upper target bits.
  typedef enum logic [1:0] {ESZ_8 = 2'd0, ESZ_16 = 2'd1, ESZ_W = 2'd2} esz_e;
  typedef enum logic [2:0] {BR_ALWAYS = 3'd0, BR_EQ = 3'd1, BR_NE = 3'd2,
                            BR_LT = 3'd3, BR_GT = 3'd4} brcond_e;

  // Execution-unit instruction, bit 31 down to bit 0.
  typedef struct packed {
    logic       we;      // 31
    logic       td;      // 30 three-way (broadcast) write
    logic [4:0] rd;      // 29-25
    logic       ta;      // 24
    logic [4:0] ra;      // 23-19
    logic       tb;      // 18
    logic [4:0] rb;      // 17-13
    logic [6:0] opcode;  // 12-6
    logic [5:0] opctl;   // 5-0
  } eu_instr_t;

  // Data Stream Unit instruction, bit 34 down to bit 0.
  typedef struct packed {
    logic               shift_en;    // 34
    logic               shift_left;  // 33
    logic [1:0]         shift_addr;  // 32-31
    logic               mwe;         // 30
    logic [1:0]         w_unit;      // 29-28
    logic [MADDR_W-1:0] w_madd;      // 27-18
    logic [1:0]         w_radd;      // 17-16
    logic               addr_en;     // 15
    logic               reg_we;      // 14
    logic [1:0]         l_unit;      // 13-12
    logic [MADDR_W-1:0] l_madd;      // 11-2
    logic [1:0]         l_radd;      // 1-0
  } dsu_instr_t;

  // Shared resources that execution units compete for.
  typedef enum logic [3:0] {
    FU_NONE = 4'd0, FU_SUM = 4'd1, FU_MAX = 4'd2, FU_MUL = 4'd3, FU_CMP = 4'd4,
    FU_SHIFT = 4'd5, FU_LOGIC = 4'd6, FU_RAMIDX = 4'd7, FU_RAMWR = 4'd8,
    FU_SPIDX = 4'd9
  } fu_class_e;
  localparam int NUM_CLASSES = 10;

  function automatic fu_class_e class_of(logic [6:0] op);
    case (op)
      OP_SUM:            return FU_SUM;
      OP_MAX, OP_MAXMOV: return FU_MAX;
      OP_MUL:            return FU_MUL;
      OP_CMP:            return FU_CMP;
      OP_SHIFT:          return FU_SHIFT;
      OP_LOGIC:          return FU_LOGIC;
      OP_IDXM:           return FU_RAMIDX;
      OP_ST:             return FU_RAMWR;
      OP_IDXS:           return FU_SPIDX;
      default:           return FU_NONE;
    endcase
  endfunction

  // Mechanism events reported by the processor, one pulse per occurrence.
  typedef struct packed {
    logic issue;         // a bundle entered EXECUTE
    logic stall;         // a structural conflict held the bundle this cycle
    logic forward;       // an operand was taken from a write still in WRITE-BACK
    logic sniff;         // an operand was read from the neighbour's memory registers
    logic branch;        // a delayed branch redirected the PC
    logic broadcast;     // a Td (3-way) write was performed
    logic dsu_load;      // the Data Stream Unit indexed or loaded
    logic dsu_store;     // the Data Stream Unit wrote memory
    logic dsu_shift;     // the register window shifted
    logic spad_write;    // a Data Stream store went to the scratchpad
    logic dsu_priority;  // an execution unit lost a RAM port to the Data Stream Unit
  } evt_t;

  // One element operation on an element of width w (8, 16 or 32 bits).
  // Inputs and result sit in the low w bits of a 32-bit container.
  function automatic logic [31:0] elem_op(fu_class_e c, logic [1:0] sub, logic uns,
                                          logic [31:0] a_raw, logic [31:0] b_raw, int w);
    logic [31:0] mask, az, bz, as_, bs, r, amt;
    logic signed [31:0] sa, sb;
    logic a_gt_b, a_lt_b;
    mask = (w >= 32) ? 32'hFFFF_FFFF : ((32'd1 << w) - 32'd1);
    az = a_raw & mask;
    bz = b_raw & mask;
    as_ = az;
    bs = bz;
    if (w < 32) begin
      if (az[w-1]) as_ = az | ~mask;
      if (bz[w-1]) bs = bz | ~mask;
    end
    sa = $signed(as_);
    sb = $signed(bs);
    a_gt_b = uns ? (az > bz) : (sa > sb);
    a_lt_b = uns ? (az < bz) : (sa < sb);
    amt = bz & 32'(w - 1);
    case (c)
      FU_SUM:   r = (sub == 2'd1) ? az - bz : az + bz;
      FU_MAX:   r = a_gt_b ? az : bz;
      FU_MUL:   r = az * bz;
      FU_CMP:   case (sub)
                  2'd1:    r = {31'd0, a_lt_b};
                  2'd2:    r = {31'd0, a_gt_b};
                  default: r = {31'd0, az == bz};
                endcase
      FU_SHIFT: case (sub)
                  2'd0:    r = 32'(sa >>> amt);   // SRA
                  2'd1:    r = az >> amt;         // SRL
                  default: r = az << amt;         // SLA, SLL
                endcase
      FU_LOGIC: case (sub)
                  2'd1:    r = az & bz;
                  2'd2:    r = az ^ bz;
                  default: r = az | bz;
                endcase
      default:  r = '0;
    endcase
    return r & mask;
  endfunction

  // A whole-vector operation: the vector is split into elements of the size
  // selected by OpControl[5:4] and elem_op is applied to each element.
  function automatic word_t vec_op(fu_class_e c, logic [5:0] opctl, word_t a, word_t b);
    word_t r;
    logic [31:0] t;
    r = '0;
    case (esz_e'(opctl[5:4]))
      ESZ_8: for (int i = 0; i < VEC_W / 8; i++) begin
        t = elem_op(c, opctl[3:2], opctl[1], 32'(a[i*8 +: 8]), 32'(b[i*8 +: 8]), 8);
        r[i*8 +: 8] = t[7:0];
      end
      ESZ_16: for (int i = 0; i < VEC_W / 16; i++) begin
        t = elem_op(c, opctl[3:2], opctl[1], 32'(a[i*16 +: 16]), 32'(b[i*16 +: 16]), 16);
        r[i*16 +: 16] = t[15:0];
      end
      default: begin
        t = elem_op(c, opctl[3:2], opctl[1], 32'(a), 32'(b), VEC_W);
        r = t[VEC_W-1:0];
      end
    endcase
    return r;
  endfunction

  // Immediate operand: {Tb,Rb} sign-extended and replicated into every element.
  function automatic word_t imm_vec(logic [5:0] imm6, logic [5:0] opctl);
    word_t r;
    case (esz_e'(opctl[5:4]))
      ESZ_8:   for (int i = 0; i < VEC_W / 8; i++)  r[i*8 +: 8]   = 8'(signed'(imm6));
      ESZ_16:  for (int i = 0; i < VEC_W / 16; i++) r[i*16 +: 16] = 16'(signed'(imm6));
      default: r = VEC_W'(signed'(imm6));
    endcase
    return r;
  endfunction

endpackage
