// tb_alu: applies random and corner-case operands to every ALU operation and
// compares the result and overflow flag with a reference written with
// SystemVerilog arithmetic (signed/unsigned compares, 64-bit products).
// HI/LO is checked through MULT/MULTU/MTHI/MTLO followed by MFHI/MFLO, and
// a multiply with `en` low must leave HI/LO unchanged.
module tb_alu;
  import mips_pkg::*;
  logic clk = 1'b0, rst = 1'b1, en = 1'b1;
  word_t op1, op2, res;
  alu_op_e ctrl;
  logic overflow;
  int checks = 0, failures = 0;
  logic [63:0] hilo_ref = '0;

  always #5 clk = ~clk;

  alu dut (.clk(clk), .rst(rst), .en(en), .op1(op1), .op2(op2), .ctrl(ctrl), .res(res), .overflow(overflow));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic word_t ref_res(alu_op_e c, word_t a, word_t b);
    unique case (c)
      OP_ADD, OP_ADDU: return a + b;
      OP_SUB, OP_SUBU: return a - b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_NOR: return ~(a | b);
      OP_SLT:  return {31'b0, $signed(a) < $signed(b)};
      OP_SLTU: return {31'b0, a < b};
      OP_EQU:  return {31'b0, a == b};
      OP_NEQU: return {31'b0, a != b};
      OP_SNEG: return {31'b0, $signed(a) < 0};
      OP_SPOS: return {31'b0, $signed(a) > 0};
      OP_LNEG: return {31'b0, $signed(a) <= 0};
      OP_LPOS: return {31'b0, $signed(a) >= 0};
      OP_SLL: return b << a[4:0];
      OP_SRL: return b >> a[4:0];
      OP_SRA: return word_t'($signed(b) >>> a[4:0]);
      OP_LUI: return {b[15:0], 16'h0};
      OP_OP2: return b;
      OP_OUI: return 32'd1;
      default: return 'x;
    endcase
  endfunction

  function automatic logic ref_ovf(alu_op_e c, word_t a, word_t b);
    longint s;
    if (c == OP_ADD) s = longint'($signed(a)) + longint'($signed(b));
    else if (c == OP_SUB) s = longint'($signed(a)) - longint'($signed(b));
    else return 1'b0;
    return (s > 64'sd2147483647) || (s < -64'sd2147483648);
  endfunction

  function automatic word_t pick();
    int unsigned k = $urandom % 6;
    unique case (k)
      0: return 32'h0;
      1: return 32'h7fff_ffff;
      2: return 32'h8000_0000;
      3: return 32'hffff_ffff;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    alu_op_e ops [20] = '{OP_ADD, OP_ADDU, OP_SUB, OP_SUBU, OP_AND, OP_OR, OP_XOR, OP_NOR,
                          OP_SLT, OP_SLTU, OP_EQU, OP_NEQU, OP_SNEG, OP_SPOS, OP_LNEG, OP_LPOS,
                          OP_SLL, OP_SRL, OP_SRA, OP_LUI};
    ctrl = OP_OUI; op1 = '0; op2 = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int i = 0; i < 4000; i++) begin
      ctrl = ops[$urandom % 20];
      op1 = pick(); op2 = pick();
      if ($urandom % 4 == 0) op2 = op1;
      #1;
      check(res == ref_res(ctrl, op1, op2), $sformatf("%s %h %h -> %h", ctrl.name(), op1, op2, res));
      check(overflow == ref_ovf(ctrl, op1, op2), $sformatf("overflow %s %h %h", ctrl.name(), op1, op2));
    end
    ctrl = OP_OP2; #1 check(res == op2, "OP2");
    ctrl = OP_OUI; #1 check(res == 1, "OUI");
    // HI/LO
    for (int i = 0; i < 200; i++) begin
      int unsigned k;
      @(negedge clk);
      op1 = pick(); op2 = pick();
      k = $urandom % 4;
      unique case (k)
        0: begin ctrl = OP_MULT;  hilo_ref = 64'($signed(op1) * $signed(op2)); end
        1: begin ctrl = OP_MULTU; hilo_ref = 64'(op1) * 64'(op2); end
        2: begin ctrl = OP_MTHI;  hilo_ref[63:32] = op1; end
        3: begin ctrl = OP_MTLO;  hilo_ref[31:0] = op1; end
      endcase
      en = ($urandom % 5) != 0;
      if (!en) hilo_ref = dut.hilo;
      @(negedge clk);
      en = 1'b1;
      ctrl = OP_MFHI; #1 check(res == hilo_ref[63:32], "MFHI");
      ctrl = OP_MFLO; #1 check(res == hilo_ref[31:0], "MFLO");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
