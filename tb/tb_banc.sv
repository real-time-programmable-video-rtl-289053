// tb_banc: checks the register file and its wait register against a
// cycle-accurate model.
//  * Random reads and writes of registers 0..30 (register 0 reads zero).
//  * Wait register timing: a writer that keeps its write request asserted
//    while stop_all is high (as the frozen pipeline does) must see each
//    write to register 31 complete exactly N cycles after the previous one,
//    where N is the value previously written, whenever N > 1.
//  * Reading register 31 returns the remaining count.
// Stimulus changes at the falling edge; checks are made just before the
// rising edge.
module tb_banc;
  import mips_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [4:0] reg_src1, reg_src2, reg_dest;
  word_t donnee, data_src1, data_src2;
  logic cmd_ecr, stop_all;
  int checks = 0, failures = 0;
  word_t model [0:30];
  word_t wait_m;
  int stalls = 0, intervals = 0;

  always #5 clk = ~clk;

  banc dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic word_t rd(logic [4:0] a);
    return (a == 5'd31) ? wait_m : model[a];
  endfunction

  // model update at the rising edge
  always @(posedge clk) begin
    if (rst) begin
      model = '{default: '0}; wait_m = 0;
    end else begin
      logic stall_m;
      stall_m = cmd_ecr && reg_dest == 5'd31 && wait_m > 1;
      if (cmd_ecr && reg_dest == 5'd31 && !stall_m) wait_m = donnee;
      else if (wait_m != 0) wait_m = wait_m - 1;
      if (cmd_ecr && reg_dest != 0 && reg_dest != 31) model[reg_dest] = donnee;
    end
  end

  initial begin
    int last_done;
    cmd_ecr = 0; reg_src1 = 0; reg_src2 = 0; reg_dest = 0; donnee = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // phase 1: random register traffic, including occasional wait writes
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      reg_src1 = $urandom; reg_src2 = $urandom;
      cmd_ecr = $urandom % 2;
      reg_dest = ($urandom % 20 == 0) ? 5'd31 : 5'($urandom % 31);
      donnee = (reg_dest == 31) ? word_t'($urandom % 6) : word_t'($urandom);
      #4;
      check(data_src1 == rd(reg_src1), $sformatf("read1 r%0d", reg_src1));
      check(data_src2 == rd(reg_src2), $sformatf("read2 r%0d", reg_src2));
      check(stop_all == (cmd_ecr && reg_dest == 31 && wait_m > 1), "stop_all");
    end
    // phase 2: wait writes with a little other work in between; the writer
    // holds its request while stalled.  The interval monitor below checks
    // the spacing of completed writes.
    for (int w = 0; w < 60; w++) begin
      @(negedge clk);
      cmd_ecr = 1; reg_dest = 31; donnee = 2 + $urandom % 40; reg_src1 = 31;
      #4;
      while (stop_all) begin
        stalls++;
        check(data_src1 == wait_m, "read wait reg");
        @(negedge clk); #4;
      end
      @(negedge clk) cmd_ecr = 0;
      repeat ($urandom % 5) @(negedge clk);
    end
    check(stalls > 0 && intervals > 50, "stall mechanism exercised");
    $display("stalls=%0d intervals=%0d", stalls, intervals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // interval monitor: a wait write first requested at cycle R completes at
  // cycle max(R, previous completion + previous N)
  int cycle = 0, prev_done = -1, prev_n = 0, req_start = -1;
  always @(posedge clk) begin
    if (!rst && cmd_ecr && reg_dest == 31) begin
      if (req_start < 0) req_start = cycle;
      if (!stop_all) begin
        if (prev_done >= 0 && prev_n > 1) begin
          int exp_done;
          exp_done = (req_start > prev_done + prev_n) ? req_start : prev_done + prev_n;
          intervals++;
          check(cycle == exp_done, $sformatf("wait write at %0d, expected %0d (N=%0d)", cycle, exp_done, prev_n));
        end
        prev_done = cycle; prev_n = donnee; req_start = -1;
      end
    end else req_start = -1;
    cycle++;
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
