// frpg_pipeline: the five-stage in-order MIPS I integer pipeline of the
// power-gated core, with its four functional units in separate power
// domains.
//
// Stages: fetch (IF), decode (ID), execute (EX), memory (MEM), write-back
// (WB). The ALU, shifter, multiplier and divider are the power-gated units;
// everything else (register file, HI/LO, branch-target, address and link
// adders, forwarding muxes) is always on. Conditional branches and JR/JALR
// evaluate on the ALU, so they wake it like arithmetic does; loads, stores
// and J/JAL use no gated unit.
//
// Power-gating hooks:
//   * the fetched word goes through fu_predecoder, so the unit an
//     instruction needs is reported (if_use) while it is still in IF;
//   * id_use / ex_use report the units of the instructions in ID and EX,
//     ex_fire and ex_cancel report when an instruction completes in EX and
//     whether it carries the PG-cancel flag;
//   * each unit's outputs are clamped to zero while its vdd_ok is low
//     (isolation), and an instruction whose unit is not yet powered waits
//     in EX (wake stall). With pre-decode the wake stall only occurs after
//     the units were forced off during a cache miss.
//
// Pipeline choices of this design (the core is described only as a
// MIPS R3000-compatible 5-stage pipeline): branches and jumps resolve in EX
// and keep the MIPS delay slot, so a taken branch costs one flushed fetch;
// a load followed by a dependent instruction interlocks for one cycle
// instead of relying on the load delay slot; results are forwarded from MEM
// and WB into EX; memory is little-endian; there are no exceptions, no TLB
// (addresses are used as physical addresses) and no unaligned loads or
// stores; ADD/SUB/ADDI behave as their unsigned forms; unknown opcodes,
// SYSCALL and BREAK are no-ops. MFHI/MFLO/MTHI/MTLO/MULT/DIV wait in ID
// while a divide is in progress. COP0 register 22 is the PG mode register.
//
// Interface: imem_* to the instruction cache (a request every cycle),
// dmem_* to the data cache (in MEM), the power-gating signals above, and
// mode_we/mode_wdata/pg_enable to the mode control register.
module frpg_pipeline
  import frpg_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction cache
  output logic        imem_req,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  input  logic        imem_stall,
  // data cache
  output logic        dmem_req,
  output logic        dmem_we,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic [3:0]  dmem_be,
  input  logic [31:0] dmem_rdata,
  input  logic        dmem_stall,
  // power gating
  output fu_vec_t     if_use,
  output fu_vec_t     id_use,
  output fu_vec_t     ex_use,
  output logic        ex_fire,
  output logic        ex_cancel,
  output logic        div_busy,
  input  fu_vec_t     vdd_ok,
  output logic        wake_stall,
  // mode control register
  output logic        mode_we,
  output fu_vec_t     mode_wdata,
  input  fu_vec_t     pg_enable
);

  // ---------------------------------------------------------------- types
  typedef enum logic [3:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ, BR_J, BR_JR
  } br_e;

  typedef enum logic [2:0] {
    RES_ALU, RES_SHIFT, RES_HI, RES_LO, RES_LINK, RES_CP0, RES_NONE
  } res_e;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
    fu_vec_t     fu_use;
    logic        pg_cancel;
    alu_op_e     alu_op;
    shift_op_e   sh_op;
    logic        sh_var;
    logic        use_imm;
    logic        zero_b;     // ALU second operand is zero (branch tests)
    logic [31:0] imm;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  wr;
    logic        reg_we;
    res_e        res;
    logic        is_load;
    logic        is_store;
    logic [1:0]  msize;      // 0 byte, 1 half, 2 word
    logic        munsigned;
    br_e         br;
    logic        mul_signed;
    logic        is_mult;
    logic        is_div;
    logic        is_mthi;
    logic        is_mtlo;
    logic        is_mtc0;
    logic        uses_hilo;
    logic [31:0] rs_val;
    logic [31:0] rt_val;
  } idex_t;

  typedef struct packed {
    logic        valid;
    logic        reg_we;
    logic [4:0]  wr;
    logic [31:0] result;
    logic        is_load;
    logic        is_store;
    logic [1:0]  msize;
    logic        munsigned;
    logic [31:0] addr;
    logic [31:0] sdata;
  } exmem_t;

  typedef struct packed {
    logic        valid;
    logic        reg_we;
    logic [4:0]  wr;
    logic [31:0] value;
  } memwb_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
  } ifid_t;

  // ---------------------------------------------------------------- decode
  function automatic idex_t decode(input logic [31:0] instr, input logic [31:0] pc);
    idex_t     d;
    fu_class_t c;
    logic [5:0] op, fn;
    c  = classify_instr(instr);
    op = instr[31:26];
    fn = instr[5:0];
    d  = '0;
    d.valid     = 1'b1;
    d.pc        = pc;
    d.instr     = instr;
    d.fu_use    = c.fu_use;
    d.pg_cancel = c.pg_cancel;
    d.rs        = instr[25:21];
    d.rt        = instr[20:16];
    d.imm       = {{16{instr[15]}}, instr[15:0]};
    d.res       = RES_NONE;
    d.alu_op    = ALU_ADD;
    d.sh_op     = SH_SLL;
    d.br        = BR_NONE;
    if (c.is_special) begin
      d.wr = instr[15:11];
      unique case (fn)
        FN_SLL, FN_SRL, FN_SRA, FN_SLLV, FN_SRLV, FN_SRAV: begin
          d.res    = RES_SHIFT;
          d.reg_we = 1'b1;
          d.sh_var = fn[2];
          d.sh_op  = shift_op_e'(fn[1:0]);
        end
        FN_ADD, FN_ADDU: begin d.res = RES_ALU; d.reg_we = 1'b1; d.alu_op = ALU_ADD;  end
        FN_SUB, FN_SUBU: begin d.res = RES_ALU; d.reg_we = 1'b1; d.alu_op = ALU_SUB;  end
        FN_AND:          begin d.res = RES_ALU; d.reg_we = 1'b1; d.alu_op = ALU_AND;  end
        FN_OR:           begin d.res = RES_ALU; d.reg_we = 1'b1; d.alu_op = ALU_OR;   end
        FN_XOR:          begin d.res = RES_ALU; d.reg_we = 1'b1; d.alu_op = ALU_XOR;  end
        FN_NOR:          begin d.res = RES_ALU; d.reg_we = 1'b1; d.alu_op = ALU_NOR;  end
        FN_SLT:          begin d.res = RES_ALU; d.reg_we = 1'b1; d.alu_op = ALU_SLT;  end
        FN_SLTU:         begin d.res = RES_ALU; d.reg_we = 1'b1; d.alu_op = ALU_SLTU; end
        FN_MULT, FN_MULTU: begin
          d.is_mult = 1'b1; d.mul_signed = ~fn[0]; d.uses_hilo = 1'b1;
        end
        FN_DIV, FN_DIVU: begin
          d.is_div = 1'b1; d.mul_signed = ~fn[0]; d.uses_hilo = 1'b1;
        end
        FN_MFHI: begin d.res = RES_HI; d.reg_we = 1'b1; d.uses_hilo = 1'b1; end
        FN_MFLO: begin d.res = RES_LO; d.reg_we = 1'b1; d.uses_hilo = 1'b1; end
        FN_MTHI: begin d.is_mthi = 1'b1; d.uses_hilo = 1'b1; end
        FN_MTLO: begin d.is_mtlo = 1'b1; d.uses_hilo = 1'b1; end
        FN_JR:   begin d.br = BR_JR; d.alu_op = ALU_OR; d.zero_b = 1'b1; end
        FN_JALR: begin d.br = BR_JR; d.alu_op = ALU_OR; d.zero_b = 1'b1;
                       d.res = RES_LINK; d.reg_we = 1'b1; end
        default: ;
      endcase
    end else begin
      // Flagged immediate forms (011xxx) decode as their plain forms.
      logic [5:0] bop;
      bop  = (op[5:3] == 3'b011) ? {3'b001, op[2:0]} : op;
      d.wr = instr[20:16];
      unique case (bop)
        OP_ADDI, OP_ADDIU: begin d.res = RES_ALU; d.reg_we = 1'b1; d.use_imm = 1'b1; d.alu_op = ALU_ADD;  end
        OP_SLTI:  begin d.res = RES_ALU; d.reg_we = 1'b1; d.use_imm = 1'b1; d.alu_op = ALU_SLT;  end
        OP_SLTIU: begin d.res = RES_ALU; d.reg_we = 1'b1; d.use_imm = 1'b1; d.alu_op = ALU_SLTU; end
        OP_ANDI:  begin d.res = RES_ALU; d.reg_we = 1'b1; d.use_imm = 1'b1; d.alu_op = ALU_AND;
                        d.imm = {16'd0, instr[15:0]}; end
        OP_ORI:   begin d.res = RES_ALU; d.reg_we = 1'b1; d.use_imm = 1'b1; d.alu_op = ALU_OR;
                        d.imm = {16'd0, instr[15:0]}; end
        OP_XORI:  begin d.res = RES_ALU; d.reg_we = 1'b1; d.use_imm = 1'b1; d.alu_op = ALU_XOR;
                        d.imm = {16'd0, instr[15:0]}; end
        OP_LUI:   begin d.res = RES_ALU; d.reg_we = 1'b1; d.use_imm = 1'b1; d.alu_op = ALU_LUI; end
        OP_LB:  begin d.is_load = 1'b1; d.reg_we = 1'b1; d.msize = 2'd0; end
        OP_LBU: begin d.is_load = 1'b1; d.reg_we = 1'b1; d.msize = 2'd0; d.munsigned = 1'b1; end
        OP_LH:  begin d.is_load = 1'b1; d.reg_we = 1'b1; d.msize = 2'd1; end
        OP_LHU: begin d.is_load = 1'b1; d.reg_we = 1'b1; d.msize = 2'd1; d.munsigned = 1'b1; end
        OP_LW:  begin d.is_load = 1'b1; d.reg_we = 1'b1; d.msize = 2'd2; end
        OP_SB:  begin d.is_store = 1'b1; d.msize = 2'd0; end
        OP_SH:  begin d.is_store = 1'b1; d.msize = 2'd1; end
        OP_SW:  begin d.is_store = 1'b1; d.msize = 2'd2; end
        OP_BEQ:  begin d.br = BR_EQ;  d.alu_op = ALU_XOR; end
        OP_BNE:  begin d.br = BR_NE;  d.alu_op = ALU_XOR; end
        OP_BLEZ: begin d.br = BR_LEZ; d.alu_op = ALU_OR; d.zero_b = 1'b1; end
        OP_BGTZ: begin d.br = BR_GTZ; d.alu_op = ALU_OR; d.zero_b = 1'b1; end
        OP_REGIMM: begin
          d.br = instr[16] ? BR_GEZ : BR_LTZ;
          d.alu_op = ALU_OR;
          d.zero_b = 1'b1;
          if (instr[20]) begin d.res = RES_LINK; d.reg_we = 1'b1; d.wr = 5'd31; end
        end
        OP_J:   d.br = BR_J;
        OP_JAL: begin d.br = BR_J; d.res = RES_LINK; d.reg_we = 1'b1; d.wr = 5'd31; end
        OP_COP0: begin
          if (instr[25:21] == CP0_MF) begin d.res = RES_CP0; d.reg_we = 1'b1; end
          if (instr[25:21] == CP0_MT) d.is_mtc0 = 1'b1;
        end
        default: ;
      endcase
    end
    if (d.wr == 5'd0) d.reg_we = 1'b0;
    return d;
  endfunction

  // ---------------------------------------------------------------- state
  logic [31:0] pc;
  ifid_t       ifid;
  idex_t       idex;
  exmem_t      exmem;
  memwb_t      memwb;
  logic [31:0] hi, lo;

  // ---------------------------------------------------------------- IF
  assign imem_req  = 1'b1;
  assign imem_addr = pc;

  fu_predecoder u_predec (
    .instr       (imem_rdata),
    .instr_valid (!imem_stall),
    .fu_use      (if_use),
    .pg_cancel   ()
  );

  // ---------------------------------------------------------------- ID
  idex_t       id_dec;
  logic [31:0] rf_rd1, rf_rd2;
  logic        id_hazard;

  always_comb begin
    id_dec = decode(ifid.instr, ifid.pc);
    id_dec.valid = ifid.valid;
    id_use = ifid.valid ? id_dec.fu_use : '0;
  end

  regfile u_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .ra1   (ifid.instr[25:21]),
    .ra2   (ifid.instr[20:16]),
    .rd1   (rf_rd1),
    .rd2   (rf_rd2),
    .we    (memwb.valid && memwb.reg_we),
    .wa    (memwb.wr),
    .wd    (memwb.value)
  );

  // Load-use interlock, and HI/LO ordering behind a running divide.
  always_comb begin
    id_hazard = 1'b0;
    if (ifid.valid) begin
      if (idex.valid && idex.is_load && idex.reg_we &&
          (idex.wr == ifid.instr[25:21] || idex.wr == ifid.instr[20:16]))
        id_hazard = 1'b1;
      if (id_dec.uses_hilo && (div_busy || (idex.valid && idex.is_div)))
        id_hazard = 1'b1;
    end
  end

  // ---------------------------------------------------------------- EX
  logic [31:0] fwd_a, fwd_b, alu_b, alu_y, sh_y, mul_hi, mul_lo;
  logic [31:0] div_q, div_r, ex_result, br_target, ex_addr, link_pc;
  logic        br_taken, div_done, ctrl_wait, ex_hold, gstall, id_moves, id_accept;
  logic [31:0] alu_y_iso, sh_y_iso, mul_hi_iso, mul_lo_iso, div_q_iso, div_r_iso;

  // Forwarding from MEM (non-load results) and WB.
  always_comb begin
    fwd_a = idex.rs_val;
    fwd_b = idex.rt_val;
    if (memwb.valid && memwb.reg_we && memwb.wr == idex.rs) fwd_a = memwb.value;
    if (memwb.valid && memwb.reg_we && memwb.wr == idex.rt) fwd_b = memwb.value;
    if (exmem.valid && exmem.reg_we && !exmem.is_load && exmem.wr == idex.rs) fwd_a = exmem.result;
    if (exmem.valid && exmem.reg_we && !exmem.is_load && exmem.wr == idex.rt) fwd_b = exmem.result;
  end

  assign alu_b = idex.zero_b ? 32'd0 : idex.use_imm ? idex.imm : fwd_b;

  alu u_alu (
    .op (idex.alu_op),
    .a  (fwd_a),
    .b  (alu_b),
    .y  (alu_y)
  );

  shifter u_shift (
    .op (idex.sh_op),
    .d  (fwd_b),
    .sa (idex.sh_var ? fwd_a[4:0] : idex.instr[10:6]),
    .y  (sh_y)
  );

  multiplier u_mult (
    .is_signed (idex.mul_signed),
    .a         (fwd_a),
    .b         (fwd_b),
    .hi        (mul_hi),
    .lo        (mul_lo)
  );

  divider u_div (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (ex_fire && idex.is_div),
    .is_signed (idex.mul_signed),
    .a         (fwd_a),
    .b         (fwd_b),
    .busy      (div_busy),
    .done      (div_done),
    .quot      (div_q),
    .rem       (div_r)
  );

  // Isolation: a unit's outputs read as zero while its rail is down.
  assign alu_y_iso  = vdd_ok[FU_ALU]   ? alu_y  : '0;
  assign sh_y_iso   = vdd_ok[FU_SHIFT] ? sh_y   : '0;
  assign mul_hi_iso = vdd_ok[FU_MULT]  ? mul_hi : '0;
  assign mul_lo_iso = vdd_ok[FU_MULT]  ? mul_lo : '0;
  assign div_q_iso  = vdd_ok[FU_DIV]   ? div_q  : '0;
  assign div_r_iso  = vdd_ok[FU_DIV]   ? div_r  : '0;

  // Branch conditions are read from the ALU result (XOR of the operands for
  // BEQ/BNE, the operand itself for the tests against zero and for JR);
  // target, link and address adders are always on.
  assign link_pc = idex.pc + 32'd8;
  assign ex_addr = fwd_a + idex.imm;

  always_comb begin
    unique case (idex.br)
      BR_EQ:   br_taken = (alu_y_iso == '0);
      BR_NE:   br_taken = (alu_y_iso != '0);
      BR_LEZ:  br_taken = alu_y_iso[31] || alu_y_iso == '0;
      BR_GTZ:  br_taken = !alu_y_iso[31] && alu_y_iso != '0;
      BR_LTZ:  br_taken = alu_y_iso[31];
      BR_GEZ:  br_taken = !alu_y_iso[31];
      BR_J,
      BR_JR:   br_taken = 1'b1;
      default: br_taken = 1'b0;
    endcase
    br_taken = br_taken && idex.valid;
    unique case (idex.br)
      BR_J:    br_target = {link_pc[31:28] , idex.instr[25:0], 2'b00};
      BR_JR:   br_target = alu_y_iso;
      default: br_target = idex.pc + 32'd4 + {idex.imm[29:0], 2'b00};
    endcase
  end

  always_comb begin
    unique case (idex.res)
      RES_ALU:   ex_result = alu_y_iso;
      RES_SHIFT: ex_result = sh_y_iso;
      RES_HI:    ex_result = hi;
      RES_LO:    ex_result = lo;
      RES_LINK:  ex_result = link_pc;
      RES_CP0:   ex_result = (idex.instr[15:11] == CP0_PGMODE) ? 32'(pg_enable) : '0;
      default:   ex_result = '0;
    endcase
  end

  // Stall and flow control.
  assign gstall     = dmem_stall;
  assign wake_stall = idex.valid && ((idex.fu_use & ~vdd_ok) != '0);
  // A taken branch waits until its delay slot has been fetched.
  assign ctrl_wait  = br_taken && !ifid.valid;
  assign ex_hold    = gstall || wake_stall || ctrl_wait;
  assign ex_fire    = idex.valid && !ex_hold;
  assign ex_use     = idex.valid ? idex.fu_use : '0;
  assign ex_cancel  = idex.pg_cancel;
  assign id_moves   = ifid.valid && !ex_hold && !id_hazard;
  assign id_accept  = !gstall && (id_moves || !ifid.valid);

  assign mode_we    = ex_fire && idex.is_mtc0 && idex.instr[15:11] == CP0_PGMODE;
  assign mode_wdata = fwd_b[NUM_FU-1:0];

  // ---------------------------------------------------------------- MEM
  logic [31:0] sdata_al, ld_val, mem_value;
  logic [3:0]  be;
  logic [1:0]  bo;

  assign bo = exmem.addr[1:0];
  always_comb begin
    unique case (exmem.msize)
      2'd0:    begin sdata_al = {4{exmem.sdata[7:0]}};  be = 4'b0001 << bo; end
      2'd1:    begin sdata_al = {2{exmem.sdata[15:0]}}; be = bo[1] ? 4'b1100 : 4'b0011; end
      default: begin sdata_al = exmem.sdata;            be = 4'b1111; end
    endcase
    unique case (exmem.msize)
      2'd0: begin
        ld_val = {24'd0, dmem_rdata[8*bo +: 8]};
        if (!exmem.munsigned) ld_val[31:8] = {24{ld_val[7]}};
      end
      2'd1: begin
        ld_val = {16'd0, bo[1] ? dmem_rdata[31:16] : dmem_rdata[15:0]};
        if (!exmem.munsigned) ld_val[31:16] = {16{ld_val[15]}};
      end
      default: ld_val = dmem_rdata;
    endcase
    mem_value = exmem.is_load ? ld_val : exmem.result;
  end

  assign dmem_req   = exmem.valid && (exmem.is_load || exmem.is_store);
  assign dmem_we    = exmem.is_store;
  assign dmem_addr  = exmem.addr;
  assign dmem_wdata = sdata_al;
  assign dmem_be    = be;

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc    <= RESET_PC;
      ifid  <= '0;
      idex  <= '0;
      exmem <= '0;
      memwb <= '0;
      hi    <= '0;
      lo    <= '0;
    end else begin
      // PC and IF/ID
      if (ex_fire && br_taken) begin
        pc <= br_target;
        if (id_moves) ifid.valid <= 1'b0;   // drop the wrong-path fetch
      end else if (id_accept) begin
        ifid.valid <= !imem_stall;
        ifid.pc    <= pc;
        ifid.instr <= imem_rdata;
        if (!imem_stall) pc <= pc + 32'd4;
      end

      // ID/EX
      if (ex_hold) begin
        idex.rs_val <= fwd_a;               // keep forwarded operands
        idex.rt_val <= fwd_b;
      end else if (id_moves) begin
        idex        <= id_dec;
        idex.rs_val <= rf_rd1;
        idex.rt_val <= rf_rd2;
      end else begin
        idex.valid  <= 1'b0;
      end

      // EX/MEM
      if (!gstall) begin
        exmem.valid     <= ex_fire;
        exmem.reg_we    <= idex.reg_we && !idex.is_mtc0;
        exmem.wr        <= idex.wr;
        exmem.result    <= ex_result;
        exmem.is_load   <= idex.is_load;
        exmem.is_store  <= idex.is_store;
        exmem.msize     <= idex.msize;
        exmem.munsigned <= idex.munsigned;
        exmem.addr      <= ex_addr;
        exmem.sdata     <= fwd_b;
      end

      // MEM/WB
      if (!gstall) begin
        memwb.valid  <= exmem.valid;
        memwb.reg_we <= exmem.reg_we;
        memwb.wr     <= exmem.wr;
        memwb.value  <= mem_value;
      end

      // HI/LO (always on)
      if (div_done) begin
        hi <= div_r_iso;
        lo <= div_q_iso;
      end else if (ex_fire) begin
        if (idex.is_mult) begin
          hi <= mul_hi_iso;
          lo <= mul_lo_iso;
        end
        if (idex.is_mthi) hi <= fwd_a;
        if (idex.is_mtlo) lo <= fwd_a;
      end
    end
  end

  // ---------------------------------------------------------------- checks
  // An instruction never completes on a unit whose rail is down.
  a_powered : assert property (@(posedge clk) disable iff (!rst_n)
    ex_fire |-> ((idex.fu_use & ~vdd_ok) == '0));
  // The divider keeps power while it computes.
  a_div_on : assert property (@(posedge clk) disable iff (!rst_n)
    div_busy |-> vdd_ok[FU_DIV]);

endmodule
