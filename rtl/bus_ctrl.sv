// bus_ctrl: memory system and video signal port of the processor.
//
// Address map (upper 16 address bits zero):
//   0x0000-0x01FF  instruction/data RAM.  Fetches use byte address bits 9:2;
//                  loads and stores use bits 7:0 directly as the word index.
//   0x1000-0x19FF  character RAM, byte-wide, index = address bits 11:0; a
//                  load returns the byte zero-extended.
//   0x2000-0x200F  font lookup and load.  A store here (sw rC, 0x2000(rL))
//                  reads the font ROM at glyph (rC - 32), line = address bits
//                  3:0, and tells the video controller to load that byte:
//                  character lookup, font lookup and pixel load in one
//                  instruction.
//   0x4001         store: toggle BLANK
//   0x4002         store: toggle HSYNC
//   0x4003         store: toggle VSYNC
//   0x4004         store: toggle HSYNC and VSYNC together
//
// Timing: memory reads are answered in the same cycle.  The video strobes
// (load/hsync/vsync/blank_to_video) are registered and last one cycle; the
// font ROM is read synchronously on the same edge, so byte_to_video is valid
// in the cycle load_to_video is high.  While stop_all is high the memory
// stage may already hold the next store, so no strobe is issued and no
// memory is written: the store takes effect on the cycle the stall ends.
//
// Following the original: the address map, the 32-character font offset,
// glyph * 16 + line addressing, and OR-ing the character byte onto the data
// bus.  This design's choices: the video strobes and the font lookup require
// a store request (the original decoded the address alone), and the font
// lookup's store window at 0x2000 also issues the load strobe.
module bus_ctrl
  import mips_pkg::*;
#(
  parameter string PROG_FILE = "rtl/rtproc_prog.hex",
  parameter string FONT_FILE = ""
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       stop_all,
  // instruction extraction stage
  input  word_t      adr_from_ei,
  output word_t      instr_to_ei,
  // memory stage
  input  logic       req_from_mem,
  input  logic       r_w_from_mem,    // 1: write
  input  word_t      adr_from_mem,
  input  word_t      data_from_mem,
  output word_t      data_to_mem,
  // video controller
  output logic       load_to_video,
  output logic       vsync_to_video,
  output logic       hsync_to_video,
  output logic       blank_to_video,
  output logic [7:0] byte_to_video
);

  logic        instr_sel, data_sel, char_sel, font_sel, store;
  word_t       instr_word, data_word;
  logic [7:0]  char_byte, glyph;
  logic [11:0] char_idx;

  // Instruction port
  assign instr_sel   = (adr_from_ei[31:14] == '0);
  assign instr_to_ei = instr_sel ? instr_word : '0;

  // Data port decode
  always_comb begin
    data_sel = 1'b0;
    char_sel = 1'b0;
    if (req_from_mem && !rst && adr_from_mem[31:16] == 16'h0000) begin
      unique case (adr_from_mem[15:9])
        7'b0000000: data_sel = 1'b1;
        7'b0001000, 7'b0001001, 7'b0001010, 7'b0001011, 7'b0001100: char_sel = 1'b1;
        default: ;
      endcase
    end
  end
  assign char_idx    = adr_from_mem[11:0];
  assign store       = req_from_mem & r_w_from_mem & ~rst;
  assign data_to_mem = (data_sel ? data_word : '0) | (char_sel ? {24'h0, char_byte} : '0);

  // Font lookup: glyph = character code - 32, 96 glyphs
  assign glyph    = data_from_mem[7:0] - 8'(FONT_FIRST_CHAR);
  assign font_sel = store && (adr_from_mem[31:4] == ADR_FONT_LOAD) && (glyph < 8'(FONT_CHARS));

  instr_data_ram #(.INIT_FILE(PROG_FILE)) u_ram (
    .clk   (clk),
    .adr_a (adr_from_ei[9:2]),
    .do_a  (instr_word),
    .adr_b (adr_from_mem[7:0]),
    .we_b  (data_sel & r_w_from_mem & ~stop_all),
    .di_b  (data_from_mem),
    .do_b  (data_word)
  );

  char_ram u_char (
    .clk  (clk),
    .adr  (char_idx),
    .we   (char_sel & r_w_from_mem & ~stop_all),
    .din  (data_from_mem[7:0]),
    .dout (char_byte)
  );

  font_rom #(.INIT_FILE(FONT_FILE)) u_font (
    .clk  (clk),
    .en   (font_sel & ~stop_all),
    .adr  ({glyph[6:0], adr_from_mem[3:0]}),
    .dout (byte_to_video)
  );

  // One-cycle video strobes
  always_ff @(posedge clk) begin
    if (rst || stop_all) begin
      load_to_video  <= 1'b0;
      blank_to_video <= 1'b0;
      hsync_to_video <= 1'b0;
      vsync_to_video <= 1'b0;
    end else begin
      load_to_video  <= store && (adr_from_mem[31:4] == ADR_FONT_LOAD);
      blank_to_video <= store && (adr_from_mem == ADR_VID_BLANK);
      hsync_to_video <= store && (adr_from_mem == ADR_VID_HSYNC || adr_from_mem == ADR_VID_HVSYNC);
      vsync_to_video <= store && (adr_from_mem == ADR_VID_VSYNC || adr_from_mem == ADR_VID_HVSYNC);
    end
  end

endmodule
