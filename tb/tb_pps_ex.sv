// tb_pps_ex: random decoded instructions through the execute stage,
// compared with a model of its output register one edge later.
// Covers ALU results (add/sub/logic/compare subset), signed overflow
// raising IT_OVERF, a pending cause taking priority, branches confirmed
// only when the compare result is 1, link instructions writing adr + 4
// only when taken, address = offset + (pc or op1), and the clear and
// stop_all behaviour.
module tb_pps_ex;
  import mips_pkg::*;
  logic clk = 1'b0, rst = 1'b1, stop_all, clear;
  di_t di;
  ex_t ex, m;
  int checks = 0, failures = 0;
  int n_taken = 0, n_ovf = 0, n_link = 0;

  always #5 clk = ~clk;
  pps_ex dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic word_t alu_ref(alu_op_e c, word_t a, word_t b, output logic ovf);
    longint s;
    ovf = 0;
    unique case (c)
      OP_ADD: begin s = longint'($signed(a)) + longint'($signed(b)); ovf = s > 64'sd2147483647 || s < -64'sd2147483648; return a + b; end
      OP_SUB: begin s = longint'($signed(a)) - longint'($signed(b)); ovf = s > 64'sd2147483647 || s < -64'sd2147483648; return a - b; end
      OP_ADDU: return a + b;
      OP_AND: return a & b;
      OP_OR: return a | b;
      OP_EQU: return {31'b0, a == b};
      OP_NEQU: return {31'b0, a != b};
      OP_SLT: return {31'b0, $signed(a) < $signed(b)};
      OP_LPOS: return {31'b0, $signed(a) >= 0};
      default: return 'x;
    endcase
  endfunction

  initial begin
    alu_op_e ops [9] = '{OP_ADD, OP_SUB, OP_ADDU, OP_AND, OP_OR, OP_EQU, OP_NEQU, OP_SLT, OP_LPOS};
    stop_all = 0; clear = 0; di = '0;
    repeat (2) @(posedge clk);
    m = dut.ex;
    @(negedge clk) rst = 0;
    for (int i = 0; i < 20000; i++) begin
      word_t r; logic ovf, taken;
      @(negedge clk);
      di = '0;
      di.code_ual = ops[$urandom % 9];
      di.op1 = ($urandom % 4 == 0) ? 32'h7fff_fff0 : word_t'($urandom);
      di.op2 = ($urandom % 4 == 0) ? di.op1 : ($urandom % 3 == 0) ? word_t'($urandom % 64) : word_t'($urandom);
      di.bra = (di.code_ual inside {OP_EQU, OP_NEQU, OP_SLT, OP_LPOS}) && ($urandom % 2);
      di.link = di.bra && $urandom % 3 == 0;
      di.offset = $urandom % 4096; di.mode = $urandom; di.adr = ($urandom % 256) << 2;
      di.adr_reg_dest = $urandom; di.ecr_reg = !di.bra || di.link; di.op_mem = $urandom; di.r_w = $urandom;
      di.exc_cause = ($urandom % 10 == 0) ? IT_ERINS : IT_NOEXC;
      di.level = level_e'($urandom % 4); di.it_ok = $urandom;
      stop_all = $urandom % 6 == 0; clear = $urandom % 10 == 0;
      r = alu_ref(di.code_ual, di.op1, di.op2, ovf);
      taken = di.bra && r[0];
      @(posedge clk);
      if (!stop_all) begin
        m.adr = di.adr;
        if (clear) begin
          m.bra_confirm = 0; m.data_ual = 0; m.adresse = 0; m.adr_reg_dest = 0; m.ecr_reg = 0;
          m.op_mem = 0; m.r_w = 0; m.exc_cause = IT_NOEXC; m.level = LVL_DI; m.it_ok = 0;
        end else begin
          m.bra_confirm = taken;
          m.data_ual = di.link ? di.adr + 4 : r;
          m.adresse = di.offset + (di.mode ? di.adr : di.op1);
          m.adr_reg_dest = di.adr_reg_dest;
          m.ecr_reg = di.link ? taken : di.ecr_reg;
          m.op_mem = di.op_mem; m.r_w = di.r_w;
          m.exc_cause = (di.exc_cause != IT_NOEXC) ? di.exc_cause : ovf ? IT_OVERF : IT_NOEXC;
          m.level = di.level; m.it_ok = di.it_ok;
          n_taken += taken; n_ovf += ovf; n_link += di.link && taken;
        end
      end
      #1 check(ex == m, $sformatf("ex output %s op1=%h op2=%h", di.code_ual.name(), di.op1, di.op2));
    end
    check(n_taken > 0 && n_ovf > 0 && n_link > 0, "branches, overflow and links exercised");
    $display("taken=%0d overflow=%0d link=%0d", n_taken, n_ovf, n_link);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
