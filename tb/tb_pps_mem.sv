// tb_pps_mem: random execute-stage outputs through the memory stage.
// Checks the bus request outputs in the same cycle (address, store data,
// read/write, request suppressed by clear) and the registered write-back
// bundle one edge later: memory data for memory accesses, the ALU result
// otherwise; clear gives an empty bundle and stop_all holds it.
module tb_pps_mem;
  import mips_pkg::*;
  logic clk = 1'b0, rst = 1'b1, stop_all, clear, mtc_r_w, mtc_req;
  word_t mtc_data, mtc_adr, ctm_data;
  ex_t ex;
  mem_t mem, m;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  pps_mem dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    stop_all = 0; clear = 0; ex = '0; ctm_data = 0;
    repeat (2) @(posedge clk);
    m = mem;
    @(negedge clk) rst = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      ex.adr = $urandom; ex.bra_confirm = $urandom; ex.data_ual = $urandom; ex.adresse = $urandom;
      ex.adr_reg_dest = $urandom; ex.ecr_reg = $urandom; ex.op_mem = $urandom; ex.r_w = $urandom;
      ex.exc_cause = ($urandom % 5 == 0) ? IT_OVERF : IT_NOEXC; ex.level = level_e'($urandom % 4); ex.it_ok = $urandom;
      ctm_data = $urandom; stop_all = $urandom % 6 == 0; clear = $urandom % 8 == 0;
      #1;
      check(mtc_adr == ex.adresse && mtc_data == ex.data_ual && mtc_r_w == ex.r_w, "bus request fields");
      check(mtc_req == (ex.op_mem && !clear), "bus request");
      @(posedge clk);
      if (!stop_all) begin
        if (clear) m = '{adr: ex.adr, adr_reg_dest: '0, ecr_reg: 0, data_ecr: '0, exc_cause: IT_NOEXC, level: LVL_DI, it_ok: 0};
        else m = '{adr: ex.adr, adr_reg_dest: ex.adr_reg_dest, ecr_reg: ex.ecr_reg,
                   data_ecr: ex.op_mem ? ctm_data : ex.data_ual, exc_cause: ex.exc_cause,
                   level: ex.level, it_ok: ex.it_ok};
      end
      #1 check(mem == m, "write-back bundle");
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
