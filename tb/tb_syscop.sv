// tb_syscop: cycle-level reference model of the system coprocessor driven
// with random register writes, mask/unmask/return commands, exception
// causes and hardware interrupt requests.  Checks each cycle: the
// `exc_taken` output, the vector (VECTIT, or ADRESSE on a return), both
// read ports, and after each edge the register contents.  Counts exceptions,
// taken hardware interrupts, masked interrupts and returns so that each
// mechanism is known to have occurred.
module tb_syscop;
  import mips_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  word_t mem_adr, mem_exc_cause, vecteur_it, write_data, read_data1, read_data2;
  logic mem_it_ok, it_mat, exc_taken, write_scp;
  logic [4:0] write_adr, read_adr1, read_adr2;
  int checks = 0, failures = 0;
  word_t m [12:15];
  logic m_save;
  int n_exc = 0, n_it = 0, n_masked = 0, n_ret = 0;

  always #5 clk = ~clk;
  syscop dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic word_t mrd(logic [4:0] a);
    return (a >= 12 && a <= 15) ? m[a] : '0;
  endfunction

  initial begin
    word_t causes [6] = '{IT_NOEXC, IT_OVERF, IT_ERINS, IT_BREAK, IT_SCALL, IT_NOEXC};
    word_t cmds [4] = '{SYS_MASK, SYS_UNMASK, SYS_ITRET, 32'd7};
    mem_adr = 0; mem_exc_cause = 0; mem_it_ok = 0; it_mat = 0; write_scp = 0;
    write_adr = 0; write_data = 0; read_adr1 = 0; read_adr2 = 0;
    m = '{default: '0}; m_save = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 20000; i++) begin
      logic exc, itr, ret; word_t nm [12:15]; logic nsave;
      mem_adr = $urandom & 32'hfffc;
      mem_exc_cause = ($urandom % 6 == 0) ? causes[$urandom % 6] : IT_NOEXC;
      mem_it_ok = $urandom; it_mat = $urandom % 3 == 0;
      write_scp = $urandom % 3 == 0;
      write_adr = ($urandom % 2) ? 5'd0 : 5'(12 + $urandom % 5);
      write_data = (write_adr == 0) ? cmds[$urandom % 4] : $urandom;
      read_adr1 = 5'(10 + $urandom % 7); read_adr2 = 5'(10 + $urandom % 7);
      #2;
      exc = mem_exc_cause != IT_NOEXC;
      itr = it_mat && m[12][0] && mem_it_ok;
      ret = write_scp && write_adr == 0 && write_data == SYS_ITRET;
      if (exc) n_exc++; else if (itr) n_it++;
      if (it_mat && mem_it_ok && !m[12][0]) n_masked++;
      if (ret) n_ret++;
      check(exc_taken == (exc || itr || ret), "exc_taken");
      check(vecteur_it == (ret ? m[14] : m[15]), "vector");
      check(read_data1 == mrd(read_adr1) && read_data2 == mrd(read_adr2), "reads");
      // next state
      nm = m; nsave = m_save;
      if (write_scp && write_adr >= 12 && write_adr <= 15) nm[write_adr] = write_data;
      if (write_scp && write_adr == 0) begin
        if (write_data == SYS_UNMASK) nm[12][0] = 1;
        else if (write_data == SYS_MASK) nm[12][0] = 0;
        else if (write_data == SYS_ITRET) nm[12][0] = m_save;
      end
      if (exc) begin nm[12][0] = 0; nm[13] = mem_exc_cause; nm[14] = mem_adr; end
      else if (itr) begin nm[12][0] = 0; nm[13] = IT_ITMAT; nm[14] = mem_adr; end
      if (exc || itr) nsave = m[12][0];
      @(posedge clk);
      m = nm; m_save = nsave;
      #1;
      for (int r = 12; r <= 15; r++) check(dut.scp_reg[r] == m[r], $sformatf("reg %0d", r));
      @(negedge clk);
    end
    check(n_exc > 0 && n_it > 0 && n_masked > 0 && n_ret > 0, "all mechanisms seen");
    $display("exceptions=%0d interrupts=%0d masked=%0d returns=%0d", n_exc, n_it, n_masked, n_ret);
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
