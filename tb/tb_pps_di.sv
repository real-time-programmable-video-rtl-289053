// tb_pps_di: encodes MIPS instructions with random register fields and
// immediates and checks the decoded bundle one edge later: ALU operation,
// operand values (register data, shift amount, zero/sign-extended
// immediate), address offset and mode, destination register and bank,
// write enable, branch/link/memory flags, exception cause and bypass level.
// It also checks the register addresses and use flags sent to the bypass
// unit, bra_detect, the IT_ERINS bubble for an undefined opcode, and that
// stop_di/clear insert a bubble while stop_all holds the register.
module tb_pps_di;
  import mips_pkg::*;
  logic clk = 1'b0, rst = 1'b1, stop_all, clear, bra_detect, use1, use2, stop_di, ei_it_ok;
  reg_adr_t adr_reg1, adr_reg2;
  word_t data1, data2, ei_adr, ei_instr;
  di_t di;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  pps_di dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic word_t r_type(int fn, int rs, int rt, int rd, int sh);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic word_t lo16(word_t w);
    return {16'h0, w[15:0]};
  endfunction
  function automatic word_t i_type(int opc, int rs, int rt, logic [15:0] imm);
    return {6'(opc), 5'(rs), 5'(rt), imm};
  endfunction

  // expected decode of one instruction
  typedef struct {
    string    name;
    word_t    instr;
    alu_op_e  op;
    word_t    op1, op2, offset;
    reg_adr_t dest;
    logic     ecr, bra, link, mem, rw, mode;
    word_t    exc;
    level_e   lvl;
    logic     u1, u2;
  } exp_t;

  task automatic run(exp_t e);
    @(negedge clk);
    ei_instr = e.instr; ei_adr = ($urandom % 1024) << 2; ei_it_ok = 1; stop_di = 0; clear = 0; stop_all = 0;
    data1 = $urandom; data2 = $urandom;
    #1;
    check(use1 == e.u1 && use2 == e.u2, {e.name, " use flags"});
    if (e.u1) check(adr_reg1[4:0] == e.instr[25:21], {e.name, " reg1"});
    if (e.u2) check(adr_reg2[4:0] == e.instr[20:16], {e.name, " reg2"});
    check(bra_detect == e.bra, {e.name, " bra_detect"});
    @(posedge clk); #1;
    check(di.code_ual == e.op, $sformatf("%s op %s", e.name, di.code_ual.name()));
    check(di.op1 == (e.u1 ? data1 : e.op1), {e.name, " op1"});
    check(di.op2 == (e.u2 ? data2 : e.op2), {e.name, " op2"});
    if (e.bra || e.mem) check(di.offset == e.offset && di.mode == e.mode, $sformatf("%s offset %h", e.name, di.offset));
    check(di.ecr_reg == e.ecr, {e.name, " ecr"});
    if (e.ecr) check(di.adr_reg_dest == e.dest, $sformatf("%s dest %h", e.name, di.adr_reg_dest));
    check(di.bra == e.bra && di.link == e.link, {e.name, " branch flags"});
    check(di.op_mem == e.mem && (!e.mem || di.r_w == e.rw), {e.name, " memory flags"});
    check(di.exc_cause == e.exc, {e.name, " cause"});
    check(di.level == e.lvl, {e.name, " level"});
    check(di.adr == ei_adr && di.it_ok, {e.name, " address"});
  endtask

  initial begin
    int rs, rt, rd, sh; logic [15:0] imm; di_t held; word_t zx, sx, sh2;
    stop_all = 0; clear = 0; stop_di = 0; ei_it_ok = 0; ei_adr = 0; ei_instr = 0; data1 = 0; data2 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 300; i++) begin
      rs = 1 + $urandom % 30; rt = 1 + $urandom % 30; rd = 1 + $urandom % 30; sh = $urandom % 32;
      imm = $urandom; zx = {16'h0, imm}; sx = {{16{imm[15]}}, imm}; sh2 = {{14{imm[15]}}, imm, 2'b00};
      run('{"ADD",  r_type(6'h20, rs, rt, rd, 0), OP_ADD,  0, 0, 0, {1'b0, 5'(rd)}, 1, 0, 0, 0, 0, 0, IT_NOEXC, LVL_EX, 1, 1});
      run('{"SUBU", r_type(6'h23, rs, rt, rd, 0), OP_SUBU, 0, 0, 0, {1'b0, 5'(rd)}, 1, 0, 0, 0, 0, 0, IT_NOEXC, LVL_EX, 1, 1});
      run('{"SLT",  r_type(6'h2a, rs, rt, rd, 0), OP_SLT,  0, 0, 0, {1'b0, 5'(rd)}, 1, 0, 0, 0, 0, 0, IT_NOEXC, LVL_EX, 1, 1});
      run('{"SLL",  r_type(6'h00, 0, rt, rd, sh), OP_SLL, word_t'(sh), 0, 0, {1'b0, 5'(rd)}, 1, 0, 0, 0, 0, 0, IT_NOEXC, LVL_EX, 0, 1});
      run('{"SRAV", r_type(6'h07, rs, rt, rd, 0), OP_SRA, 0, 0, 0, {1'b0, 5'(rd)}, 1, 0, 0, 0, 0, 0, IT_NOEXC, LVL_EX, 1, 1});
      run('{"MULT", r_type(6'h18, rs, rt, 0, 0), OP_MULT, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, IT_NOEXC, LVL_EX, 1, 1});
      run('{"MFLO", r_type(6'h12, 0, 0, rd, 0), OP_MFLO, 0, lo16(r_type(6'h12, 0, 0, rd, 0)), 0, {1'b0, 5'(rd)}, 1, 0, 0, 0, 0, 0, IT_NOEXC, LVL_EX, 0, 0});
      run('{"ADDI", i_type(6'h08, rs, rt, imm), OP_ADD, 0, sx, 0, {1'b0, 5'(rt)}, 1, 0, 0, 0, 0, 0, IT_NOEXC, LVL_EX, 1, 0});
      run('{"ORI",  i_type(6'h0d, rs, rt, imm), OP_OR, 0, zx, 0, {1'b0, 5'(rt)}, 1, 0, 0, 0, 0, 0, IT_NOEXC, LVL_EX, 1, 0});
      run('{"LUI",  i_type(6'h0f, 0, rt, imm), OP_LUI, 0, zx, 0, {1'b0, 5'(rt)}, 1, 0, 0, 0, 0, 0, IT_NOEXC, LVL_EX, 0, 0});
      run('{"LW",   i_type(6'h23, rs, rt, imm), OP_OUI, 0, zx, sx, {1'b0, 5'(rt)}, 1, 0, 0, 1, 0, 0, IT_NOEXC, LVL_MEM, 1, 0});
      run('{"SW",   i_type(6'h2b, rs, rt, imm), OP_OP2, 0, 0, sx, 0, 0, 0, 0, 1, 1, 0, IT_NOEXC, LVL_DI, 1, 1});
      run('{"BEQ",  i_type(6'h04, rs, rt, imm), OP_EQU, 0, 0, sh2, 0, 0, 1, 0, 0, 0, 1, IT_NOEXC, LVL_DI, 1, 1});
      run('{"BNE",  i_type(6'h05, rs, rt, imm), OP_NEQU, 0, 0, sh2, 0, 0, 1, 0, 0, 0, 1, IT_NOEXC, LVL_DI, 1, 1});
      run('{"BLTZ", i_type(6'h01, rs, 0, imm), OP_SNEG, 0, zx, sh2, 0, 0, 1, 0, 0, 0, 1, IT_NOEXC, LVL_DI, 1, 0});
      run('{"BGEZAL", i_type(6'h01, rs, 17, imm), OP_LPOS, 0, zx, sh2, 6'd31, 1, 1, 1, 0, 0, 1, IT_NOEXC, LVL_EX, 1, 0});
      run('{"JR",   r_type(6'h08, rs, 0, 0, 0), OP_OUI, 0, lo16(r_type(6'h08, rs, 0, 0, 0)), 0, 0, 0, 1, 0, 0, 0, 0, IT_NOEXC, LVL_DI, 1, 0});
      run('{"MTC0", {6'h10, 5'd4, 5'(rt), 5'(rd), 11'd0}, OP_OP2, 0, 0, 0, {1'b1, 5'(rd)}, 1, 0, 0, 0, 0, 0, IT_NOEXC, LVL_DI, 0, 1});
      run('{"SYSCALL", r_type(6'h0c, 0, 0, 0, 0), OP_OUI, 0, 32'h0c, 0, 0, 0, 0, 0, 0, 0, 0, IT_SCALL, LVL_DI, 0, 0});
      run('{"BREAK", r_type(6'h0d, 0, 0, 0, 0), OP_OUI, 0, 32'h0d, 0, 0, 0, 0, 0, 0, 0, 0, IT_BREAK, LVL_DI, 0, 0});
      run('{"undefined", i_type(6'h3f, rs, rt, imm), OP_OUI, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, IT_ERINS, LVL_DI, 0, 0});
      // J: offset = pc[31:28] & target & 00, operand 1 zero
      @(negedge clk);
      ei_instr = {6'h02, 26'(imm * 7)}; ei_adr = 32'h0000_0100;
      @(posedge clk); #1;
      check(di.bra && di.offset == {4'h0, 26'(imm * 7), 2'b00} && di.op1 == 0 && !di.mode, "J target");
      // stop_di / clear give a bubble, stop_all holds
      @(negedge clk);
      held = di;
      ei_instr = i_type(6'h08, rs, rt, imm); stop_all = 1;
      @(posedge clk); #1 check(di == held, "stop_all holds");
      @(negedge clk); stop_all = 0; stop_di = $urandom; clear = !stop_di;
      @(posedge clk); #1 check(!di.ecr_reg && !di.bra && !di.op_mem && di.exc_cause == IT_NOEXC && di.it_ok == !clear, "bubble");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
