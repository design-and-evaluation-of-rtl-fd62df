// frpg_pkg: types and constants shared by the fine-grained power-gated core.
//
// The core gates the power of four functional units (FUs) separately: the
// ALU, the shifter, the multiplier and the divider. This package numbers
// those domains, lists the MIPS I opcodes and funct codes the core decodes,
// defines the operation codes passed to the FUs, and holds the one function
// that both the pre-decoder and the decoder use to classify an instruction.
//
// PG-cancel flag encoding (this design's choice; the architecture only says
// that an otherwise unused opcode bit of the arithmetic/logic instructions
// carries the flag):
//   * immediate ALU instructions (opcode 001xxx) carry it in opcode bit 4
//     (instruction bit 30), which moves them into the 011xxx row that
//     MIPS I leaves unused;
//   * register-format instructions (SPECIAL, opcode 000000) cannot take a
//     single free opcode bit without colliding with COP0, J, BEQ, ADDI or
//     LB, so the flagged form uses opcode 010100, also unused in MIPS I.
// Code with no flag set is plain MIPS I code.
package frpg_pkg;

  // Power-gating domains, one bit per FU in every per-FU vector.
  localparam int NUM_FU = 4;
  typedef enum logic [1:0] {
    FU_ALU   = 2'd0,
    FU_SHIFT = 2'd1,
    FU_MULT  = 2'd2,
    FU_DIV   = 2'd3
  } fu_e;
  typedef logic [NUM_FU-1:0] fu_vec_t;

  // Opcodes (instruction bits 31:26).
  localparam logic [5:0] OP_SPECIAL     = 6'h00;
  localparam logic [5:0] OP_REGIMM      = 6'h01;
  localparam logic [5:0] OP_J           = 6'h02;
  localparam logic [5:0] OP_JAL         = 6'h03;
  localparam logic [5:0] OP_BEQ         = 6'h04;
  localparam logic [5:0] OP_BNE         = 6'h05;
  localparam logic [5:0] OP_BLEZ        = 6'h06;
  localparam logic [5:0] OP_BGTZ        = 6'h07;
  localparam logic [5:0] OP_ADDI        = 6'h08;
  localparam logic [5:0] OP_ADDIU       = 6'h09;
  localparam logic [5:0] OP_SLTI        = 6'h0A;
  localparam logic [5:0] OP_SLTIU       = 6'h0B;
  localparam logic [5:0] OP_ANDI        = 6'h0C;
  localparam logic [5:0] OP_ORI         = 6'h0D;
  localparam logic [5:0] OP_XORI        = 6'h0E;
  localparam logic [5:0] OP_LUI         = 6'h0F;
  localparam logic [5:0] OP_COP0        = 6'h10;
  localparam logic [5:0] OP_SPECIAL_PGC = 6'h14;  // SPECIAL with PG-cancel
  localparam logic [5:0] OP_LB          = 6'h20;
  localparam logic [5:0] OP_LH          = 6'h21;
  localparam logic [5:0] OP_LW          = 6'h23;
  localparam logic [5:0] OP_LBU         = 6'h24;
  localparam logic [5:0] OP_LHU         = 6'h25;
  localparam logic [5:0] OP_SB          = 6'h28;
  localparam logic [5:0] OP_SH          = 6'h29;
  localparam logic [5:0] OP_SW          = 6'h2B;

  // SPECIAL funct codes (instruction bits 5:0).
  localparam logic [5:0] FN_SLL   = 6'h00;
  localparam logic [5:0] FN_SRL   = 6'h02;
  localparam logic [5:0] FN_SRA   = 6'h03;
  localparam logic [5:0] FN_SLLV  = 6'h04;
  localparam logic [5:0] FN_SRLV  = 6'h06;
  localparam logic [5:0] FN_SRAV  = 6'h07;
  localparam logic [5:0] FN_JR    = 6'h08;
  localparam logic [5:0] FN_JALR  = 6'h09;
  localparam logic [5:0] FN_MFHI  = 6'h10;
  localparam logic [5:0] FN_MTHI  = 6'h11;
  localparam logic [5:0] FN_MFLO  = 6'h12;
  localparam logic [5:0] FN_MTLO  = 6'h13;
  localparam logic [5:0] FN_MULT  = 6'h18;
  localparam logic [5:0] FN_MULTU = 6'h19;
  localparam logic [5:0] FN_DIV   = 6'h1A;
  localparam logic [5:0] FN_DIVU  = 6'h1B;
  localparam logic [5:0] FN_ADD   = 6'h20;
  localparam logic [5:0] FN_ADDU  = 6'h21;
  localparam logic [5:0] FN_SUB   = 6'h22;
  localparam logic [5:0] FN_SUBU  = 6'h23;
  localparam logic [5:0] FN_AND   = 6'h24;
  localparam logic [5:0] FN_OR    = 6'h25;
  localparam logic [5:0] FN_XOR   = 6'h26;
  localparam logic [5:0] FN_NOR   = 6'h27;
  localparam logic [5:0] FN_SLT   = 6'h2A;
  localparam logic [5:0] FN_SLTU  = 6'h2B;

  // COP0 rs field values.
  localparam logic [4:0] CP0_MF = 5'h00;
  localparam logic [4:0] CP0_MT = 5'h04;
  // COP0 register number of the power-gating mode control register.
  localparam logic [4:0] CP0_PGMODE = 5'd22;

  // ALU operations.
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_LUI
  } alu_op_e;

  // Shifter operations.
  typedef enum logic [1:0] {
    SH_SLL = 2'd0,
    SH_SRL = 2'd2,
    SH_SRA = 2'd3
  } shift_op_e;

  // Result of classifying one instruction word by its opcode and funct.
  typedef struct packed {
    fu_vec_t fu_use;     // FU the instruction executes on (at most one bit)
    logic    pg_cancel;  // keep that FU powered after the operation
    logic    is_special; // register format (SPECIAL or its flagged form)
  } fu_class_t;

  // Classify an instruction word: which FU it uses and its PG-cancel flag.
  // Conditional branches compare, and JR/JALR pass their target register,
  // through the ALU, so they use it too (they carry no PG-cancel flag, and
  // the flag stays clear for them). Loads and stores compute addresses in
  // an always-on adder and J/JAL need no unit; LUI is executed by the ALU.
  function automatic fu_class_t classify_instr(input logic [31:0] instr);
    fu_class_t c;
    logic [5:0] op, fn;
    op = instr[31:26];
    fn = instr[5:0];
    c  = '0;
    if (op == OP_SPECIAL || op == OP_SPECIAL_PGC) begin
      c.is_special = 1'b1;
      c.pg_cancel  = (op == OP_SPECIAL_PGC);
      unique case (fn)
        FN_SLL, FN_SRL, FN_SRA, FN_SLLV, FN_SRLV, FN_SRAV:
          c.fu_use[FU_SHIFT] = 1'b1;
        FN_MULT, FN_MULTU:
          c.fu_use[FU_MULT] = 1'b1;
        FN_DIV, FN_DIVU:
          c.fu_use[FU_DIV] = 1'b1;
        FN_ADD, FN_ADDU, FN_SUB, FN_SUBU, FN_AND, FN_OR, FN_XOR, FN_NOR,
        FN_SLT, FN_SLTU, FN_JR, FN_JALR:
          c.fu_use[FU_ALU] = 1'b1;
        default: ;
      endcase
      // The canonical NOP (all-zero word, SLL $0,$0,0) has no effect and
      // wakes no unit.
      if (instr == 32'd0) c.fu_use = '0;
      // The flag means nothing on an instruction that uses no FU, nor on
      // a jump.
      if (c.fu_use == '0 || fn == FN_JR || fn == FN_JALR) c.pg_cancel = 1'b0;
    end else if (op[5:4] == 2'b00 && op[3]) begin
      c.fu_use[FU_ALU] = 1'b1;                 // 001xxx immediate ALU op
    end else if (op[5:3] == 3'b011) begin
      c.fu_use[FU_ALU] = 1'b1;                 // 011xxx: flagged form
      c.pg_cancel      = 1'b1;
    end else if (op == OP_REGIMM || op == OP_BEQ || op == OP_BNE ||
                 op == OP_BLEZ || op == OP_BGTZ) begin
      c.fu_use[FU_ALU] = 1'b1;                 // conditional branch compare
    end
    return c;
  endfunction

endpackage
