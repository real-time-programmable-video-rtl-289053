// alu: 32-bit arithmetic and logic unit of the execute stage.
//
// One 33-bit adder serves addition, subtraction and every comparison: for
// SUB, SLT and EQU/NEQU operand 2 is inverted and a carry of 1 is added; for
// signed operations both operands are sign-extended to 33 bits, so bit 32 of
// the sum is the "less than" result for SLT and SLTU alike.  The tests
// against zero (SPOS, LNEG) add 0 to operand 1 and look at the sign bit and
// the zero flag.  Shifts take their amount from op1[4:0] and shift op2.
// MULT/MULTU write the 64-bit product into the internal HI/LO register at the
// clock edge and return the low word; MTHI/MTLO load one half.
//
// Interface: op1, op2, ctrl in; res and overflow (signed ADD/SUB only) out,
// combinational.  HI/LO is the only state; it updates when `en` is high, so
// a frozen pipeline does not repeat a multiply.  All of this follows the
// original processor; the enable is this design's addition.
module alu
  import mips_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    en,
  input  word_t   op1,
  input  word_t   op2,
  input  alu_op_e ctrl,
  output word_t   res,
  output logic    overflow
);

  logic        signe, comp_op2, igno_op2;
  logic [32:0] efct_op1, efct_op2, res_add;
  logic        nul;
  word_t       res_shl, res_shr, res_lui;
  logic [63:0] hilo, tmp_hilo;

  always_comb begin
    signe    = ctrl inside {OP_ADD, OP_SUB, OP_SLT, OP_SNEG, OP_SPOS, OP_LNEG, OP_LPOS};
    comp_op2 = ctrl inside {OP_SUB, OP_SUBU, OP_SLT, OP_SLTU, OP_EQU, OP_NEQU};
    igno_op2 = ctrl inside {OP_SPOS, OP_LNEG};
    efct_op1 = {signe & op1[31], op1};
    if (comp_op2)      efct_op2 = ~{signe & op2[31], op2};
    else if (igno_op2) efct_op2 = '0;
    else               efct_op2 = {signe & op2[31], op2};
    res_add  = efct_op1 + efct_op2 + 33'(comp_op2);
    nul      = (res_add[31:0] == '0);
    res_shl  = op2 << op1[4:0];
    res_shr  = (ctrl == OP_SRA) ? word_t'($signed(op2) >>> op1[4:0]) : (op2 >> op1[4:0]);
    res_lui  = {op2[15:0], 16'h0000};
  end

  always_comb begin
    unique case (ctrl)
      OP_MULT:  tmp_hilo = 64'($signed(op1) * $signed(op2));
      OP_MULTU: tmp_hilo = 64'(op1 * op2);
      OP_MTHI:  tmp_hilo = {op1, hilo[31:0]};
      OP_MTLO:  tmp_hilo = {hilo[63:32], op1};
      default:  tmp_hilo = hilo;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) hilo <= '0;
    else if (en && (ctrl inside {OP_MULT, OP_MULTU, OP_MTHI, OP_MTLO})) hilo <= tmp_hilo;
  end

  assign overflow = ((ctrl == OP_ADD) && (op1[31] == op2[31]) && (op1[31] != res_add[31])) ||
                    ((ctrl == OP_SUB) && (op1[31] != op2[31]) && (op1[31] != res_add[31]));

  always_comb begin
    unique case (ctrl)
      OP_ADD, OP_ADDU, OP_SUB, OP_SUBU: res = res_add[31:0];
      OP_AND:   res = op1 & op2;
      OP_OR:    res = op1 | op2;
      OP_NOR:   res = ~(op1 | op2);
      OP_XOR:   res = op1 ^ op2;
      OP_SLT, OP_SLTU: res = {31'b0, res_add[32]};
      OP_EQU:   res = {31'b0, nul};
      OP_NEQU:  res = {31'b0, ~nul};
      OP_SNEG:  res = {31'b0, op1[31]};
      OP_SPOS:  res = {31'b0, ~(op1[31] | nul)};
      OP_LNEG:  res = {31'b0, op1[31] | nul};
      OP_LPOS:  res = {31'b0, ~op1[31]};
      OP_SLL:   res = res_shl;
      OP_SRL, OP_SRA: res = res_shr;
      OP_LUI:   res = res_lui;
      OP_MFHI:  res = hilo[63:32];
      OP_MFLO:  res = hilo[31:0];
      OP_MULT, OP_MULTU: res = tmp_hilo[31:0];
      OP_MTHI, OP_MTLO: res = op1;
      OP_OP2:   res = op2;
      OP_OUI:   res = 32'h0000_0001;
      default:  res = '0;
    endcase
  end

endmodule
