// video_controller: turns the processor's one-cycle strobes into VGA/DAC
// signals.
//
// HSYNC, VSYNC and BLANK are toggles: each has a flip-flop that starts high
// (inactive, the outputs are active low) and inverts on every clock in
// which its strobe from the bus controller is high, so the software issues
// one store to start a pulse and another, the right number of cycles later,
// to end it.  The pixel path is an 8-bit shift register: a load strobe
// copies the font byte in, otherwise it rotates left one place per pixel
// clock, so bit 7 goes out first.  The outgoing bit drives all ten bits of
// red, green and blue (1 = white, 0 = black) through an output register.
//
// Timing: the sync/blank outputs change on the clock edge at which the
// strobe is sampled; the pixel bit appears on RGB one clock after the shift
// register has it, so a loaded byte's bit 7 is on RGB two edges after the
// load strobe's edge.  The DAC clock is the pixel clock itself.  Reset sets
// the three toggles high and clears the shift register and RGB.  All of this
// follows the original, except the shift register's reset value (zero here).
module video_controller (
  input  logic       clk,            // pixel clock
  input  logic       rst,
  input  logic [7:0] rt_font_byte,
  input  logic       rt_shift_load,
  input  logic       rt_blank,
  input  logic       rt_hsync,
  input  logic       rt_vsync,
  output logic       vidout_clk,
  output logic [9:0] vidout_red,
  output logic [9:0] vidout_green,
  output logic [9:0] vidout_blue,
  output logic       vidout_blank_n,
  output logic       vidout_hsync_n,
  output logic       vidout_vsync_n
);

  logic [7:0] shift_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      vidout_blank_n <= 1'b1;
      vidout_hsync_n <= 1'b1;
      vidout_vsync_n <= 1'b1;
    end else begin
      if (rt_blank) vidout_blank_n <= ~vidout_blank_n;
      if (rt_hsync) vidout_hsync_n <= ~vidout_hsync_n;
      if (rt_vsync) vidout_vsync_n <= ~vidout_vsync_n;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)                shift_data <= 8'h00;
    else if (rt_shift_load) shift_data <= rt_font_byte;
    else                    shift_data <= {shift_data[6:0], shift_data[7]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      vidout_red   <= '0;
      vidout_green <= '0;
      vidout_blue  <= '0;
    end else begin
      vidout_red   <= {10{shift_data[7]}};
      vidout_green <= {10{shift_data[7]}};
      vidout_blue  <= {10{shift_data[7]}};
    end
  end

  assign vidout_clk = clk;

endmodule
