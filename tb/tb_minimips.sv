// tb_minimips: runs a test program (minimips_test.hex, loaded through the
// PROG_FILE parameter) on the processor alone and checks what it leaves in
// data memory and what it sends to the video port.  The program exercises:
//  * ALU results forwarded from the execute and memory stages, a signed
//    multiply read back through LO, and a load followed directly by a use
//    (hazard stall);
//  * a counted loop (taken and not-taken bne), a taken beq, a jump-and-link
//    through a register and the return through jr;
//  * ten font loads paced by the wait register with N = 8: consecutive load
//    strobes must be exactly 8 cycles apart and carry the font byte of 'A'
//    for lines 0..9; sync/blank strobes paced with N = 20 and 30;
//  * a signed overflow, which must jump to the vector set in coprocessor
//    register 15 with CAUSE = overflow and ADRESSE = the faulting
//    instruction, without writing its destination or running the
//    instruction after it;
//  * the hardware interrupt: a request while interrupts are masked (after
//    reset) has no effect; once the exception handler has unmasked them, a
//    request enters the handler, which counts it and returns, and the
//    interrupted idle loop carries on counting.
module tb_minimips;
  import mips_pkg::*;
  logic clk = 1'b0, rst = 1'b1, it_mat = 1'b0;
  logic load_to_video, vsync_to_video, hsync_to_video, blank_to_video, stop_all;
  logic [7:0] byte_to_video;
  int checks = 0, failures = 0;
  int cycle = 0, last_load = -1, n_load = 0, n_stall = 0;
  int last_sync = -1, n_h = 0, n_v = 0, n_b = 0;
  int sync_gaps [$];

  always #20 clk = ~clk;   // 25 MHz

  minimips #(.PROG_FILE("tb/minimips_test.hex")) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (!rst) begin
    cycle++;
    if (stop_all) n_stall++;
    if (load_to_video) begin
      check(byte_to_video == 8'(65 ^ (17 * n_load)), $sformatf("load %0d byte %h", n_load, byte_to_video));
      if (last_load >= 0) check(cycle - last_load == 8, $sformatf("load interval %0d", cycle - last_load));
      last_load = cycle; n_load++;
    end
    if (hsync_to_video || vsync_to_video || blank_to_video) begin
      if (last_sync >= 0) sync_gaps.push_back(cycle - last_sync);
      last_sync = cycle;
      n_h += hsync_to_video; n_v += vsync_to_video; n_b += blank_to_video;
    end
  end

  function automatic word_t ram(int i);
    return dut.u_bus.u_ram.mem[i];
  endfunction

  initial begin
    int idle0, idle1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (50) @(posedge clk);
    @(negedge clk) it_mat = 1;     // masked: must be ignored
    repeat (10) @(negedge clk);
    it_mat = 0;
    repeat (540) @(posedge clk);
    #1;
    check(ram(200) == 93, "add with bypass");
    check(ram(201) == -7, "sub");
    check(ram(202) == -700, "mult/mflo");
    check(ram(203) == 186, "load-use");
    check(ram(204) == 1, "slt");
    check(ram(209) == 5, "loop count");
    check(ram(210) == 5, "beq taken skips");
    check(ram(208) == 24 * 4, "jalr link address");
    check(ram(211) == 77, "return from jr");
    check(ram(205) == IT_OVERF, "exception cause");
    check(ram(206) == 71 * 4, "exception address");
    check(ram(207) == 0, "faulting instruction not written");
    check(ram(212) == 0, "instruction after fault squashed");
    check(n_load == 10, $sformatf("10 loads, saw %0d", n_load));
    check(n_h == 2 && n_v == 2 && n_b == 1, $sformatf("sync strobes h%0d v%0d b%0d", n_h, n_v, n_b));
    // gaps: hsync->hv 20, hv->blank 30, blank->vsync 1
    check(sync_gaps.size() == 3 && sync_gaps[0] == 20 && sync_gaps[1] == 30 && sync_gaps[2] == 1, "sync strobe spacing");
    check(n_stall > 0, "wait register stalled the pipeline");
    check(ram(213) == 0, "masked interrupt ignored");
    // unmasked interrupt: handler counts it in word 213 and returns
    idle0 = ram(214);
    check(idle0 > 0, "idle loop running");
    @(negedge clk) it_mat = 1;
    for (int i = 0; i < 200 && ram(213) == 0; i++) @(negedge clk);
    it_mat = 0;
    check(ram(213) == 1, "interrupt handler entered once");
    repeat (100) @(posedge clk);
    #1;
    idle1 = ram(214);
    check(ram(213) == 1, "no second interrupt after the request ends");
    repeat (100) @(posedge clk);
    #1;
    check(ram(214) > idle1 && idle1 > idle0, "idle loop resumes after the return");
    check(dut.u_syscop.scp_reg[12][0] == 1'b1, "interrupts enabled again after the return");
    $display("loads=%0d stall_cycles=%0d", n_load, n_stall);
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
