// tb_pps_ei: random control inputs to the instruction extraction stage
// compared with a cycle model: the instruction is registered with its
// address one edge after it is presented; genop substitutes a NOP (keeping
// the previous address), clear substitutes a NOP with interrupts disallowed,
// stop_ei and stop_all hold the register.  The memory address output must
// follow the pc in the same cycle.
module tb_pps_ei;
  import mips_pkg::*;
  logic clk = 1'b0, rst = 1'b1, clear, stop_all, stop_ei, genop, ei_it_ok;
  word_t cte_instr, etc_adr, pf_pc, ei_instr, ei_adr;
  word_t m_instr, m_adr; logic m_ok;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  pps_ei dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    clear = 0; stop_all = 0; stop_ei = 0; genop = 0; cte_instr = 0; pf_pc = 0;
    repeat (2) @(posedge clk);
    #1 check(ei_instr == INS_NOP && ei_adr == 0 && !ei_it_ok, "reset");
    m_instr = INS_NOP; m_adr = 0; m_ok = 0;
    @(negedge clk) rst = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      clear = $urandom % 10 == 0; stop_all = $urandom % 6 == 0; stop_ei = $urandom % 4 == 0;
      genop = $urandom % 4 == 0; cte_instr = $urandom; pf_pc = $urandom & ~32'h3;
      #1 check(etc_adr == pf_pc, "memory address");
      @(posedge clk);
      if (!stop_all) begin
        if (clear) begin m_instr = INS_NOP; m_ok = 0; end
        else if (!stop_ei) begin
          m_instr = genop ? INS_NOP : cte_instr;
          if (!genop) m_adr = pf_pc;
          m_ok = 1;
        end
      end
      #1 check(ei_instr == m_instr && ei_adr == m_adr && ei_it_ok == m_ok, "registered instruction");
    end
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
