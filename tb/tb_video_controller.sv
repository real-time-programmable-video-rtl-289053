// tb_video_controller: drives random strobes and font bytes into the video
// controller and compares every output, every cycle, with a reference model:
// three toggle flip-flops starting high, an 8-bit register that loads or
// rotates left, and an RGB register copying bit 7.  Also checks directly
// the latency of Figure-11 style sequences: a loaded byte's bit 7 appears on
// RGB two clock edges after the edge that samples the load strobe.
module tb_video_controller;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] byte_in = '0;
  logic load = 1'b0, blank = 1'b0, hsync = 1'b0, vsync = 1'b0;
  logic vclk, blank_n, hsync_n, vsync_n;
  logic [9:0] red, green, blue;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  video_controller dut (
    .clk(clk), .rst(rst), .rt_font_byte(byte_in), .rt_shift_load(load),
    .rt_blank(blank), .rt_hsync(hsync), .rt_vsync(vsync), .vidout_clk(vclk),
    .vidout_red(red), .vidout_green(green), .vidout_blue(blue),
    .vidout_blank_n(blank_n), .vidout_hsync_n(hsync_n), .vidout_vsync_n(vsync_n)
  );

  logic m_bl = 1'b1, m_hs = 1'b1, m_vs = 1'b1, m_pix = 1'b0;
  logic [7:0] m_sr = '0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic compare();
    check(blank_n == m_bl && hsync_n == m_hs && vsync_n == m_vs, "sync/blank outputs");
    check(red == {10{m_pix}} && green == {10{m_pix}} && blue == {10{m_pix}}, "pixel outputs");
  endtask

  // model update at each edge (before inputs change)
  always @(posedge clk) if (!rst) begin
    m_pix <= m_sr[7];
    m_sr  <= load ? byte_in : {m_sr[6:0], m_sr[7]};
    if (blank) m_bl <= ~m_bl;
    if (hsync) m_hs <= ~m_hs;
    if (vsync) m_vs <= ~m_vs;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 compare();
    check(blank_n && hsync_n && vsync_n, "reset leaves the active-low outputs high");
    rst = 1'b0;
    // directed: load 8'b1000_0001 and watch the pixels 7..0
    @(negedge clk); load = 1'b1; byte_in = 8'h81;
    @(negedge clk); load = 1'b0;
    @(negedge clk); check(red == 10'h3ff, "bit 7 on RGB two edges after the load edge");
    for (int i = 6; i >= 0; i--) begin
      @(negedge clk); check(red == (i == 0 ? 10'h3ff : 10'h000), $sformatf("pixel bit %0d", i));
    end
    // directed: one HSYNC strobe starts the pulse, the next ends it
    @(negedge clk); hsync = 1'b1;
    @(negedge clk); hsync = 1'b0; check(!hsync_n, "HSYNC# low after one strobe");
    repeat (5) @(negedge clk); check(!hsync_n, "HSYNC# stays low");
    hsync = 1'b1;
    @(negedge clk); hsync = 1'b0; check(hsync_n, "HSYNC# high after the second strobe");
    // random
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      compare();
      load    = ($urandom % 8) == 0;
      byte_in = 8'($urandom);
      blank   = ($urandom % 10) == 0;
      hsync   = ($urandom % 10) == 0;
      vsync   = ($urandom % 10) == 0;
    end
    check(vclk == clk, "DAC clock is the pixel clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
