// tb_rtproc_full: one complete video frame of the full-size design (all
// parameters at their defaults: 256-word program RAM, 2560-byte character
// RAM, 96-glyph font).  The character RAM is filled with a known pattern,
// the processor runs its video program from reset until VSYNC# falls for
// the second time, and rtproc_monitor checks sync timing, every font load
// of the 30 x 16 text lines (81 per line, 38880 in total) and the pixel
// stream.  Prints the measured frame length; at the VGA rate a frame would
// be 800 x 525 = 420000 cycles.
module tb_rtproc_full;
  import mips_pkg::*;

  localparam int LOADS_PER_FRAME = 30 * 16 * 81;

  logic clk = 1'b0, rst = 1'b1;
  logic vidout_clk, vidout_blank_n, vidout_hsync_n, vidout_vsync_n, stop_all;
  logic [9:0] vidout_red, vidout_green, vidout_blue, bar_led;
  longint frame_start = -1, frame_len = -1, cyc = 0;
  int vs_falls = 0;

  always #20 clk = ~clk;   // 25 MHz pixel clock

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

  logic vs_q = 1'b1;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (vs_q && !vidout_vsync_n) begin
      vs_falls++;
      if (vs_falls == 1) frame_start = cyc;
      if (vs_falls == 2) frame_len = cyc - frame_start;
    end
    vs_q <= vidout_vsync_n;
  end

  initial begin
    #1;
    for (int i = 0; i < 2560; i++) dut.u_mips.u_bus.u_char.mem[i] = mon.char_at(i);
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    wait (vs_falls == 2);
    @(posedge clk);
    mon.check(mon.n_load == LOADS_PER_FRAME,
              $sformatf("%0d font loads in the frame, expected %0d", mon.n_load, LOADS_PER_FRAME));
    mon.check(bar_led[9:7] == {vidout_blank_n, vidout_hsync_n, vidout_vsync_n}, "LED bar");
    mon.finish_checks(LOADS_PER_FRAME);
    $display("frame length %0d cycles (VGA frame: 420000)", frame_len);
    $display("TB_RESULT checks=%0d failures=%0d", mon.checks, mon.failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", mon.checks, mon.failures + 1);
    $finish;
  end

endmodule
