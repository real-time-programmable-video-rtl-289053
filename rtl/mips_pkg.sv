// mips_pkg: types and constants shared by the real-time video processor.
//
// The processor is a five-stage pipelined MIPS subset (program counter,
// instruction extraction, decode, execute, memory) whose register 31 is a
// wait down-counter used to pace software-generated video signals.  This
// package holds the word and register-address types, the ALU operation set,
// the bypass availability levels, the exception cause codes, the bundles
// that travel between pipeline stages, and the bus controller's address map.
//
// Numbers that follow the original design: the cause codes, the coprocessor
// commands, the boot address 0, the bypass level codes, and the address map
// (data/instruction RAM at 0x0000, character RAM at 0x1000-0x19FF, font
// lookup store at 0x2000-0x200F, video strobes at 0x4001-0x4004).  The ALU
// operation encoding is an enumeration chosen here; the original used a
// one-hot control word.
package mips_pkg;

  typedef logic [31:0] word_t;

  // Register address: bit 5 selects the bank (0 = general purpose
  // registers, 1 = system coprocessor registers), bits 4:0 the register.
  typedef logic [5:0] reg_adr_t;

  // Pipeline stage from which a result can be bypassed.  A larger code is an
  // earlier stage; a dependency on a producer whose level is below the stage
  // it is in cannot be resolved and stalls the decode stage.
  typedef enum logic [1:0] {
    LVL_REG = 2'b00,  // only in the register bank
    LVL_MEM = 2'b01,  // from the memory stage output register
    LVL_EX  = 2'b10,  // from the execute stage output register
    LVL_DI  = 2'b11   // from operand 2 of the decode stage output
  } level_e;

  // Exception causes (values of the coprocessor CAUSE register)
  localparam word_t IT_NOEXC = 32'h0000_0000;
  localparam word_t IT_ITMAT = 32'h0000_0001;  // hardware interrupt
  localparam word_t IT_OVERF = 32'h0000_0002;  // arithmetic overflow
  localparam word_t IT_ERINS = 32'h0000_0004;  // unknown instruction
  localparam word_t IT_BREAK = 32'h0000_0008;
  localparam word_t IT_SCALL = 32'h0000_0010;

  // Commands written to coprocessor register 0
  localparam word_t SYS_MASK   = 32'h0000_0001;
  localparam word_t SYS_UNMASK = 32'h0000_0002;
  localparam word_t SYS_ITRET  = 32'h0000_0004;

  localparam word_t ADR_INIT = 32'h0000_0000;  // boot address
  localparam word_t INS_NOP  = 32'h0000_0000;  // sll $0,$0,0

  // Register 31 of the general bank is the wait register
  localparam logic [4:0] WAIT_REG = 5'd31;

  // ALU operations
  typedef enum logic [4:0] {
    OP_ADD, OP_ADDU, OP_SUB, OP_SUBU,          // arithmetic
    OP_AND, OP_OR, OP_XOR, OP_NOR,             // logic
    OP_SLT, OP_SLTU, OP_EQU, OP_NEQU,          // tests, result 0 or 1
    OP_SNEG, OP_SPOS, OP_LNEG, OP_LPOS,        // op1 <0, >0, <=0, >=0
    OP_MULT, OP_MULTU,                         // into HI/LO, result LO
    OP_SLL, OP_SRL, OP_SRA, OP_LUI,            // shifts
    OP_MFHI, OP_MFLO, OP_MTHI, OP_MTLO,        // HI/LO access
    OP_OUI,                                    // constant 1
    OP_OP2                                     // copy operand 2
  } alu_op_e;

  // Decode stage output bundle
  typedef struct packed {
    logic     bra;           // branch instruction
    logic     link;          // branch with link
    word_t    op1;
    word_t    op2;
    alu_op_e  code_ual;
    word_t    offset;        // address offset
    reg_adr_t adr_reg_dest;
    logic     ecr_reg;       // result written to a register
    logic     mode;          // 1: address relative to the pc, 0: to op1
    logic     op_mem;        // memory access
    logic     r_w;           // 1: write (store), 0: read (load)
    word_t    adr;           // instruction address
    word_t    exc_cause;
    level_e   level;
    logic     it_ok;         // hardware interrupts allowed
  } di_t;

  // Execute stage output bundle
  typedef struct packed {
    word_t    adr;
    logic     bra_confirm;   // branch taken
    word_t    data_ual;      // ALU result, link address or store data
    word_t    adresse;       // computed branch target or memory address
    reg_adr_t adr_reg_dest;
    logic     ecr_reg;
    logic     op_mem;
    logic     r_w;
    word_t    exc_cause;
    level_e   level;
    logic     it_ok;
  } ex_t;

  // Memory stage output bundle (write-back)
  typedef struct packed {
    word_t    adr;
    reg_adr_t adr_reg_dest;
    logic     ecr_reg;
    word_t    data_ecr;      // data to write in the register bank
    word_t    exc_cause;
    level_e   level;
    logic     it_ok;
  } mem_t;

  // Bus controller address map (low 16 bits, upper 16 bits zero)
  localparam logic [27:0] ADR_FONT_LOAD = 28'h000_0200;  // 0x2000-0x200F
  localparam word_t ADR_VID_BLANK  = 32'h0000_4001;
  localparam word_t ADR_VID_HSYNC  = 32'h0000_4002;
  localparam word_t ADR_VID_VSYNC  = 32'h0000_4003;
  localparam word_t ADR_VID_HVSYNC = 32'h0000_4004;

  // Screen text format
  localparam int unsigned FONT_FIRST_CHAR = 32;  // the font starts at space
  localparam int unsigned FONT_CHARS      = 96;
  localparam int unsigned FONT_LINES      = 16;

endpackage
