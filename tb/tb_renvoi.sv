// tb_renvoi: random stimulus for the bypass and hazard unit, compared with
// an independent reference written as an explicit priority search over the
// three in-flight writers (youngest first).  Register addresses are drawn
// from a small set so that matches are frequent.  Also checks the
// write-back routing (general bank vs coprocessor, suppression during an
// interrupt) and counts how often each forwarding source and the hazard
// signal were exercised.  Purely combinational; one vector per 10 time units.
module tb_renvoi;
  import mips_pkg::*;
  reg_adr_t adr1, adr2, di_adr, ex_adr, mem_adr;
  logic use1, use2, di_ecr, ex_ecr, mem_ecr, exc_taken;
  level_e di_level, ex_level, mem_level;
  word_t di_data, ex_data, mem_data, data1, data2, write_data;
  word_t read_data1_gpr, read_data1_scp, read_data2_gpr, read_data2_scp;
  logic alea, write_gpr, write_scp;
  logic [4:0] write_adr, read_adr1, read_adr2;
  int checks = 0, failures = 0;
  int seen [4];
  int hazards = 0;

  renvoi dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic reg_adr_t radr();
    reg_adr_t r;
    r = reg_adr_t'($urandom % 4);
    if ($urandom % 8 == 0) r[5] = 1'b1;
    return r;
  endfunction

  // returns forwarding source (0 bank, 1 mem, 2 ex, 3 di) and whether it is ready
  task automatic ref_op(input reg_adr_t a, input logic u, input word_t bank,
                        output word_t d, output int src, output logic ready);
    src = 0; d = bank; ready = 1;
    if (u && a[4:0] != 0) begin
      if (di_ecr && di_adr == a) begin src = 3; d = di_data; ready = (di_level == LVL_DI); end
      else if (ex_ecr && ex_adr == a) begin src = 2; d = ex_data; ready = (ex_level inside {LVL_DI, LVL_EX}); end
      else if (mem_ecr && mem_adr == a) begin src = 1; d = mem_data; ready = (mem_level != LVL_REG); end
    end
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      word_t e1, e2; int s1, s2; logic r1, r2;
      adr1 = radr(); adr2 = radr(); di_adr = radr(); ex_adr = radr(); mem_adr = radr();
      use1 = $urandom % 4 != 0; use2 = $urandom % 4 != 0;
      di_ecr = $urandom; ex_ecr = $urandom; mem_ecr = $urandom; exc_taken = $urandom % 8 == 0;
      di_level = level_e'($urandom % 4); ex_level = level_e'($urandom % 4); mem_level = level_e'($urandom % 4);
      di_data = $urandom; ex_data = $urandom; mem_data = $urandom;
      read_data1_gpr = $urandom; read_data1_scp = $urandom; read_data2_gpr = $urandom; read_data2_scp = $urandom;
      #5;
      ref_op(adr1, use1, adr1[5] ? read_data1_scp : read_data1_gpr, e1, s1, r1);
      ref_op(adr2, use2, adr2[5] ? read_data2_scp : read_data2_gpr, e2, s2, r2);
      seen[s1]++; seen[s2]++;
      if (!(r1 && r2)) hazards++;
      check(data1 == e1, $sformatf("data1 src %0d", s1));
      check(data2 == e2, $sformatf("data2 src %0d", s2));
      check(alea == !(r1 && r2), "alea");
      check(read_adr1 == adr1[4:0] && read_adr2 == adr2[4:0], "read addresses");
      check(write_data == mem_data && write_adr == mem_adr[4:0], "write data/address");
      check(write_gpr == (mem_ecr && !mem_adr[5] && !exc_taken), "write_gpr");
      check(write_scp == (mem_ecr && mem_adr[5]), "write_scp");
      #5;
    end
    check(seen[0] > 0 && seen[1] > 0 && seen[2] > 0 && seen[3] > 0 && hazards > 0, "all sources exercised");
    $display("bank=%0d mem=%0d ex=%0d di=%0d hazards=%0d", seen[0], seen[1], seen[2], seen[3], hazards);
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
