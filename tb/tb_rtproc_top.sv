// tb_rtproc_top: end-to-end test of the video processor running its video
// program.  Fills the character RAM, releases reset and runs through
// vertical sync, the vertical back porch and the first active text lines,
// checking sync timing, font loads and pixels with rtproc_monitor.
module tb_rtproc_top;
  import mips_pkg::*;

  localparam int CYCLES = 45000;

  logic clk = 1'b0, rst = 1'b1;
  logic vidout_clk, vidout_blank_n, vidout_hsync_n, vidout_vsync_n, stop_all;
  logic [9:0] vidout_red, vidout_green, vidout_blue, bar_led;

  always #5 clk = ~clk;

  rtproc_top dut (
    .clk(clk), .rst(rst), .it_mat(1'b0), .vidout_clk(vidout_clk),
    .vidout_red(vidout_red), .vidout_green(vidout_green), .vidout_blue(vidout_blue),
    .vidout_blank_n(vidout_blank_n), .vidout_hsync_n(vidout_hsync_n),
    .vidout_vsync_n(vidout_vsync_n), .bar_led(bar_led), .stop_all(stop_all)
  );

  rtproc_monitor mon (
    .clk(clk), .rst(rst), .vidout_red(vidout_red), .vidout_green(vidout_green),
    .vidout_blue(vidout_blue), .vidout_blank_n(vidout_blank_n),
    .vidout_hsync_n(vidout_hsync_n), .vidout_vsync_n(vidout_vsync_n),
    .stop_all(stop_all),
    .load(dut.u_mips.load_to_video), .load_byte(dut.u_mips.byte_to_video),
    .alea(dut.u_mips.alea & ~stop_all),
    .bypass(~stop_all & ((dut.u_mips.u_renvoi.dep_r1 != LVL_REG) | (dut.u_mips.u_renvoi.dep_r2 != LVL_REG))),
    .branch_taken(dut.u_mips.ex.bra_confirm & ~stop_all),
    .mult(~stop_all & (dut.u_mips.di.code_ual == OP_MULT)),
    .char_read(~stop_all & dut.u_mips.u_bus.char_sel & ~dut.u_mips.mtc_r_w)
  );

  initial begin
    #1;
    for (int i = 0; i < 2560; i++) dut.u_mips.u_bus.u_char.mem[i] = mon.char_at(i);
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (CYCLES) @(posedge clk);
    mon.check(bar_led[9:7] == {vidout_blank_n, vidout_hsync_n, vidout_vsync_n} && bar_led[6:0] == 7'h7f,
              "LED bar does not mirror BLANK/HSYNC/VSYNC");
    mon.finish_checks(2 * 81);
    $display("TB_RESULT checks=%0d failures=%0d", mon.checks, mon.failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", mon.checks, mon.failures + 1);
    $finish;
  end

endmodule
