// pps_di: instruction decode stage.
//
// Decodes the instruction held by the extraction stage with a table of
// micro-instructions, one per supported MIPS instruction: ALU operation,
// where each operand comes from (register bank, coprocessor bank, zero, the
// shift amount, the zero- or sign-extended immediate), the address offset
// form, the destination register (rt, rd, $31 or $0, in either bank),
// branch/link/memory flags, an unconditional exception cause and the stage
// at which the result becomes available for bypassing.  Unknown opcodes
// decode to a bubble that raises IT_ERINS.
//
// The register addresses and use flags go combinationally to the bypass
// unit, which returns the operand values (data1/data2) in the same cycle;
// bra_detect tells the pc stage that a branch is being decoded.  The
// decoded bundle is registered (latency one cycle).  stop_di (unresolved
// hazard) or clear insert a bubble; stop_all freezes the stage.
//
// Supported: ADD ADDI ADDIU ADDU AND ANDI BEQ BGEZ BGEZAL BGTZ BLEZ BLTZ
// BLTZAL BNE BREAK COP0 J JAL JALR JR LUI LW LWC0 MFC0 MFHI MFLO MTC0 MTHI
// MTLO MULT MULTU NOR OR ORI SLL SLLV SLT SLTI SLTIU SLTU SRA SRAV SRL SRLV
// SUB SUBU SW SWC0 SYSCALL XOR XORI, with the operand and immediate choices
// of the original processor (ADDIU, like ANDI/ORI/XORI, zero-extends its
// immediate there and here).  Branches have no delay slot.
module pps_di
  import mips_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     stop_all,
  input  logic     clear,
  output logic     bra_detect,
  output reg_adr_t adr_reg1,
  output reg_adr_t adr_reg2,
  output logic     use1,
  output logic     use2,
  input  logic     stop_di,
  input  word_t    data1,
  input  word_t    data2,
  input  word_t    ei_adr,
  input  word_t    ei_instr,
  input  logic     ei_it_ok,
  output di_t      di
);

  typedef enum logic [1:0] {OFS_PCRL, OFS_NULL, OFS_SESH, OFS_SEXT} off_sel_e;
  typedef enum logic [1:0] {D_RT, D_RD, D_31, D_00} rdest_e;

  typedef struct packed {
    logic     valid;
    logic     bra;
    logic     link;
    alu_op_e  code_ual;
    logic     op_mem;
    logic     r_w;
    logic     mode;
    off_sel_e off_sel;
    word_t    exc_cause;
    logic     cop_org1;   // operand 1 from the coprocessor bank
    logic     cop_org2;   // operand 2 from the coprocessor bank
    logic     cs_imm1;    // operand 1 is an immediate
    logic     cs_imm2;    // operand 2 is an immediate
    logic     imm1_sel;   // immediate 1: 0 = zero, 1 = shift amount
    logic     imm2_sel;   // immediate 2: 0 = zero-extended, 1 = sign-extended
    level_e   level;
    logic     ecr_reg;
    logic     bank_des;   // destination in the coprocessor bank
    rdest_e   des_sel;
  } micro_t;

  // One micro-instruction: field order as in micro_t after `valid`
  function automatic micro_t mi(logic bra, logic link, alu_op_e op, logic op_mem, logic r_w,
                                logic mode, off_sel_e ofs, word_t exc, logic c1, logic c2,
                                logic i1, logic i2, logic s1, logic s2, level_e lvl,
                                logic ecr, logic bank, rdest_e dst);
    return '{valid: 1'b1, bra: bra, link: link, code_ual: op, op_mem: op_mem, r_w: r_w,
             mode: mode, off_sel: ofs, exc_cause: exc, cop_org1: c1, cop_org2: c2,
             cs_imm1: i1, cs_imm2: i2, imm1_sel: s1, imm2_sel: s2, level: lvl,
             ecr_reg: ecr, bank_des: bank, des_sel: dst};
  endfunction

  // Register-register ALU instruction writing rd
  function automatic micro_t alu_rr(alu_op_e op);
    return mi(0, 0, op, 0, 0, 0, OFS_PCRL, IT_NOEXC, 0, 0, 0, 0, 0, 0, LVL_EX, 1, 0, D_RD);
  endfunction

  // Register-immediate ALU instruction writing rt
  function automatic micro_t alu_ri(alu_op_e op, logic sext);
    return mi(0, 0, op, 0, 0, 0, OFS_PCRL, IT_NOEXC, 0, 0, 0, 1, 0, sext, LVL_EX, 1, 0, D_RT);
  endfunction

  // Conditional branch comparing rs with zero (REGIMM, BGTZ, BLEZ)
  function automatic micro_t bra_z(alu_op_e op, logic link);
    return mi(1, link, op, 0, 0, 1, OFS_SESH, IT_NOEXC, 0, 0, 0, 1, 0, 0,
              link ? LVL_EX : LVL_DI, link, 0, link ? D_31 : D_RT);
  endfunction

  function automatic micro_t decode(word_t instr);
    micro_t m;
    m = '0;
    m.code_ual  = OP_OUI;
    m.exc_cause = IT_ERINS;
    m.level     = LVL_DI;
    unique case (instr[31:26])
      6'b000000: begin  // SPECIAL
        unique case (instr[5:0])
          6'b100000: m = alu_rr(OP_ADD);
          6'b100001: m = alu_rr(OP_ADDU);
          6'b100100: m = alu_rr(OP_AND);
          6'b001101: m = mi(0, 0, OP_OUI, 0, 0, 0, OFS_PCRL, IT_BREAK, 0, 0, 1, 1, 0, 0, LVL_DI, 0, 0, D_RT);
          6'b001001: m = mi(1, 1, OP_OUI, 0, 0, 0, OFS_NULL, IT_NOEXC, 0, 0, 0, 1, 0, 0, LVL_EX, 1, 0, D_RD);
          6'b001000: m = mi(1, 0, OP_OUI, 0, 0, 0, OFS_NULL, IT_NOEXC, 0, 0, 0, 1, 0, 0, LVL_DI, 0, 0, D_RT);
          6'b010000: m = mi(0, 0, OP_MFHI, 0, 0, 0, OFS_PCRL, IT_NOEXC, 0, 0, 1, 1, 0, 0, LVL_EX, 1, 0, D_RD);
          6'b010010: m = mi(0, 0, OP_MFLO, 0, 0, 0, OFS_PCRL, IT_NOEXC, 0, 0, 1, 1, 0, 0, LVL_EX, 1, 0, D_RD);
          6'b010001: m = mi(0, 0, OP_MTHI, 0, 0, 0, OFS_PCRL, IT_NOEXC, 0, 0, 0, 1, 0, 0, LVL_DI, 0, 0, D_RT);
          6'b010011: m = mi(0, 0, OP_MTLO, 0, 0, 0, OFS_PCRL, IT_NOEXC, 0, 0, 0, 1, 0, 0, LVL_DI, 0, 0, D_RT);
          6'b011000: m = mi(0, 0, OP_MULT, 0, 0, 0, OFS_PCRL, IT_NOEXC, 0, 0, 0, 0, 0, 0, LVL_EX, 0, 0, D_RT);
          6'b011001: m = mi(0, 0, OP_MULTU, 0, 0, 0, OFS_PCRL, IT_NOEXC, 0, 0, 0, 0, 0, 0, LVL_EX, 0, 0, D_RT);
          6'b100111: m = alu_rr(OP_NOR);
          6'b100101: m = alu_rr(OP_OR);
          6'b000000: m = mi(0, 0, OP_SLL, 0, 0, 0, OFS_PCRL, IT_NOEXC, 0, 0, 1, 0, 1, 0, LVL_EX, 1, 0, D_RD);
          6'b000100: m = alu_rr(OP_SLL);
          6'b101010: m = alu_rr(OP_SLT);
          6'b101011: m = alu_rr(OP_SLTU);
          6'b000011: m = mi(0, 0, OP_SRA, 0, 0, 0, OFS_PCRL, IT_NOEXC, 0, 0, 1, 0, 1, 0, LVL_EX, 1, 0, D_RD);
          6'b000111: m = alu_rr(OP_SRA);
          6'b000010: m = mi(0, 0, OP_SRL, 0, 0, 0, OFS_PCRL, IT_NOEXC, 0, 0, 1, 0, 1, 0, LVL_EX, 1, 0, D_RD);
          6'b000110: m = alu_rr(OP_SRL);
          6'b100010: m = alu_rr(OP_SUB);
          6'b100011: m = alu_rr(OP_SUBU);
          6'b001100: m = mi(0, 0, OP_OUI, 0, 0, 0, OFS_PCRL, IT_SCALL, 0, 0, 1, 1, 0, 0, LVL_DI, 0, 0, D_RT);
          6'b100110: m = alu_rr(OP_XOR);
          default: ;
        endcase
      end
      6'b000001: begin  // REGIMM, selected by rt
        unique case (instr[20:16])
          5'b00001: m = bra_z(OP_LPOS, 1'b0);  // BGEZ
          5'b10001: m = bra_z(OP_LPOS, 1'b1);  // BGEZAL
          5'b00000: m = bra_z(OP_SNEG, 1'b0);  // BLTZ
          5'b10000: m = bra_z(OP_SNEG, 1'b1);  // BLTZAL
          default: ;
        endcase
      end
      6'b010000: begin  // COP0, selected by rs
        unique case (instr[25:21])
          5'b00001: m = mi(0, 0, OP_OP2, 0, 0, 0, OFS_PCRL, IT_NOEXC, 0, 0, 1, 1, 0, 0, LVL_DI, 1, 1, D_00);
          5'b00000: m = mi(0, 0, OP_OP2, 0, 0, 0, OFS_PCRL, IT_NOEXC, 0, 1, 1, 0, 0, 0, LVL_DI, 1, 0, D_RD);
          5'b00100: m = mi(0, 0, OP_OP2, 0, 0, 0, OFS_PCRL, IT_NOEXC, 0, 0, 1, 0, 0, 0, LVL_DI, 1, 1, D_RD);
          default: ;
        endcase
      end
      6'b001000: m = alu_ri(OP_ADD, 1'b1);    // ADDI
      6'b001001: m = alu_ri(OP_ADDU, 1'b0);   // ADDIU
      6'b001100: m = alu_ri(OP_AND, 1'b0);    // ANDI
      6'b001101: m = alu_ri(OP_OR, 1'b0);     // ORI
      6'b001110: m = alu_ri(OP_XOR, 1'b0);    // XORI
      6'b001010: m = alu_ri(OP_SLT, 1'b1);    // SLTI
      6'b001011: m = alu_ri(OP_SLTU, 1'b1);   // SLTIU
      6'b000100: m = mi(1, 0, OP_EQU, 0, 0, 1, OFS_SESH, IT_NOEXC, 0, 0, 0, 0, 0, 0, LVL_DI, 0, 0, D_RT);
      6'b000101: m = mi(1, 0, OP_NEQU, 0, 0, 1, OFS_SESH, IT_NOEXC, 0, 0, 0, 0, 0, 0, LVL_DI, 0, 0, D_RT);
      6'b000111: m = bra_z(OP_SPOS, 1'b0);    // BGTZ
      6'b000110: m = bra_z(OP_LNEG, 1'b0);    // BLEZ
      6'b000010: m = mi(1, 0, OP_OUI, 0, 0, 0, OFS_PCRL, IT_NOEXC, 0, 0, 1, 1, 0, 0, LVL_DI, 0, 0, D_RT);
      6'b000011: m = mi(1, 1, OP_OUI, 0, 0, 0, OFS_PCRL, IT_NOEXC, 0, 0, 1, 1, 0, 0, LVL_EX, 1, 0, D_31);
      6'b001111: m = mi(0, 0, OP_LUI, 0, 0, 0, OFS_PCRL, IT_NOEXC, 0, 0, 1, 1, 0, 0, LVL_EX, 1, 0, D_RT);
      6'b100011: m = mi(0, 0, OP_OUI, 1, 0, 0, OFS_SEXT, IT_NOEXC, 0, 0, 0, 1, 0, 0, LVL_MEM, 1, 0, D_RT);
      6'b110000: m = mi(0, 0, OP_OUI, 1, 0, 0, OFS_SEXT, IT_NOEXC, 0, 0, 0, 1, 0, 0, LVL_MEM, 1, 1, D_RT);
      6'b101011: m = mi(0, 0, OP_OP2, 1, 1, 0, OFS_SEXT, IT_NOEXC, 0, 0, 0, 0, 0, 0, LVL_DI, 0, 0, D_RT);
      6'b111000: m = mi(0, 0, OP_OP2, 1, 1, 0, OFS_SEXT, IT_NOEXC, 0, 1, 0, 0, 0, 0, LVL_DI, 0, 0, D_RT);
      default: ;
    endcase
    return m;
  endfunction

  micro_t     m;
  logic [4:0] rs, rt, rd, shamt;
  logic [15:0] imm;
  di_t        pre;

  always_comb begin
    m     = decode(ei_instr);
    rs    = ei_instr[25:21];
    rt    = ei_instr[20:16];
    rd    = ei_instr[15:11];
    shamt = ei_instr[10:6];
    imm   = ei_instr[15:0];

    pre           = '0;
    pre.code_ual  = OP_OUI;
    pre.exc_cause = IT_ERINS;
    pre.level     = LVL_DI;
    pre.adr       = ei_adr;
    pre.it_ok     = ei_it_ok;
    adr_reg1      = '0;
    adr_reg2      = '0;
    bra_detect    = 1'b0;
    use1          = 1'b0;
    use2          = 1'b0;

    if (m.valid) begin
      unique case (m.off_sel)
        OFS_PCRL: pre.offset = {ei_adr[31:28], ei_instr[25:0], 2'b00};
        OFS_NULL: pre.offset = '0;
        OFS_SESH: pre.offset = {{14{imm[15]}}, imm, 2'b00};
        OFS_SEXT: pre.offset = {{16{imm[15]}}, imm};
      endcase
      if (!m.cs_imm1)     pre.op1 = data1;
      else if (m.imm1_sel) pre.op1 = {27'b0, shamt};
      else                pre.op1 = '0;
      if (!m.cs_imm2)     pre.op2 = data2;
      else if (m.imm2_sel) pre.op2 = {{16{imm[15]}}, imm};
      else                pre.op2 = {16'b0, imm};
      unique case (m.des_sel)
        D_RT: pre.adr_reg_dest = {m.bank_des, rt};
        D_RD: pre.adr_reg_dest = {m.bank_des, rd};
        D_31: pre.adr_reg_dest = {m.bank_des, 5'd31};
        D_00: pre.adr_reg_dest = {m.bank_des, 5'd0};
      endcase
      pre.bra       = m.bra;
      pre.link      = m.link;
      pre.code_ual  = m.code_ual;
      pre.ecr_reg   = m.ecr_reg;
      pre.mode      = m.mode;
      pre.op_mem    = m.op_mem;
      pre.r_w       = m.r_w;
      pre.exc_cause = m.exc_cause;
      pre.level     = m.level;
      adr_reg1      = {m.cop_org1, rs};
      adr_reg2      = {m.cop_org2, rt};
      bra_detect    = m.bra;
      use1          = ~m.cs_imm1;
      use2          = ~m.cs_imm2;
    end
  end

  // A bubble: no effect, carries the address and the interrupt permission
  function automatic di_t bubble(word_t adr, logic it_ok);
    di_t b;
    b           = '0;
    b.code_ual  = OP_OUI;
    b.exc_cause = IT_NOEXC;
    b.level     = LVL_DI;
    b.adr       = adr;
    b.it_ok     = it_ok;
    return b;
  endfunction

  always_ff @(posedge clk) begin
    if (rst)                  di <= bubble('0, 1'b0);
    else if (!stop_all) begin
      if (clear || stop_di)   di <= bubble(ei_adr, clear ? 1'b0 : ei_it_ok);
      else                    di <= pre;
    end
  end

endmodule
