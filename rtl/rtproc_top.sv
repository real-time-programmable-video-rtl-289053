// rtproc_top: real-time programmable video processor.
//
// A pipelined MIPS processor generates a 640 x 480, 60 Hz VGA text display
// in software: a program paces itself with the wait register and toggles
// HSYNC, VSYNC and BLANK, and loads font bytes into the pixel shift
// register, by storing to special addresses.  The video controller turns
// those strobes into the levels and the pixel stream of the board's video
// DAC.  Processor and video controller share one clock, the 25 MHz pixel
// clock (the board derives it with a clock DLL, outside this design).
//
// Ports: clk (pixel clock), rst (synchronous, active high; on the board the
// clock DLL's "not locked"), it_mat (hardware interrupt request, tied low on
// the board), the DAC/VGA outputs, and a ten-LED bar that shows BLANK#,
// HSYNC# and VSYNC# on LEDs 9, 8 and 7 with LEDs 6..0 lit, as on the board.
// stop_all is brought out to observe the wait register's stalls.
module rtproc_top #(
  parameter string PROG_FILE = "rtl/rtproc_prog.hex",
  parameter string FONT_FILE = ""
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       it_mat,
  output logic       vidout_clk,
  output logic [9:0] vidout_red,
  output logic [9:0] vidout_green,
  output logic [9:0] vidout_blue,
  output logic       vidout_blank_n,
  output logic       vidout_hsync_n,
  output logic       vidout_vsync_n,
  output logic [9:0] bar_led,
  output logic       stop_all
);

  logic       load_to_video, vsync_to_video, hsync_to_video, blank_to_video;
  logic [7:0] byte_to_video;

  minimips #(.PROG_FILE(PROG_FILE), .FONT_FILE(FONT_FILE)) u_mips (
    .clk(clk), .rst(rst), .it_mat(it_mat),
    .load_to_video(load_to_video), .vsync_to_video(vsync_to_video),
    .hsync_to_video(hsync_to_video), .blank_to_video(blank_to_video),
    .byte_to_video(byte_to_video), .stop_all(stop_all)
  );

  video_controller u_video (
    .clk(clk), .rst(rst),
    .rt_font_byte(byte_to_video), .rt_shift_load(load_to_video),
    .rt_blank(blank_to_video), .rt_hsync(hsync_to_video), .rt_vsync(vsync_to_video),
    .vidout_clk(vidout_clk), .vidout_red(vidout_red), .vidout_green(vidout_green),
    .vidout_blue(vidout_blue), .vidout_blank_n(vidout_blank_n),
    .vidout_hsync_n(vidout_hsync_n), .vidout_vsync_n(vidout_vsync_n)
  );

  assign bar_led = {vidout_blank_n, vidout_hsync_n, vidout_vsync_n, 7'b111_1111};

endmodule
