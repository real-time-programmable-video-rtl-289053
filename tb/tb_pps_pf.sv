// tb_pps_pf: random control inputs to the program counter stage compared
// with a cycle model: priority exception > branch > pc + 4, hold on
// stop_all (always) and on stop_pf (unless an exception or branch is
// commanded).  The new pc must appear exactly one edge after the command.
// Also checks that straight-line fetch advances 4 bytes per cycle.
module tb_pps_pf;
  import mips_pkg::*;
  logic clk = 1'b0, rst = 1'b1, stop_all, bra_cmd, exch_cmd, stop_pf;
  word_t bra_adr, exch_adr, pf_pc, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  pps_pf dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    stop_all = 0; bra_cmd = 0; exch_cmd = 0; stop_pf = 0; bra_adr = 0; exch_adr = 0;
    repeat (2) @(posedge clk);
    #1 check(pf_pc == ADR_INIT, "reset address");
    @(negedge clk) rst = 0;
    model = ADR_INIT;
    // straight-line: one instruction per cycle
    repeat (20) begin
      @(posedge clk); model += 4; #1 check(pf_pc == model, "sequential fetch rate");
    end
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      stop_all = $urandom % 6 == 0; bra_cmd = $urandom % 5 == 0; exch_cmd = $urandom % 12 == 0;
      stop_pf = $urandom % 3 == 0; bra_adr = $urandom & ~32'h3; exch_adr = $urandom & ~32'h3;
      @(posedge clk);
      if (!stop_all) begin
        if (exch_cmd) model = exch_adr;
        else if (bra_cmd) model = bra_adr;
        else if (!stop_pf) model = model + 4;
      end
      #1 check(pf_pc == model, "pc");
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
