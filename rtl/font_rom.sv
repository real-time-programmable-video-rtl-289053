// font_rom: 8 x 16 pixel font, 96 glyphs (ASCII 32 to 127), 1536 bytes.
//
// Entry glyph*16 + line holds the eight pixels of one line of one glyph,
// most significant bit leftmost, 1 = lit.  The read is synchronous: the byte
// appears one clock after the address, and `en` low makes the next output
// zero (like a block RAM's output reset), so several ROM banks could be ORed.
//
// Content: INIT_FILE (hex bytes) if given.  Without one the ROM holds a
// built-in test pattern, byte = ASCII code XOR (17 * line), so that every
// glyph line is distinct and easy to predict; a real console font is loaded
// with INIT_FILE.
module font_rom
  import mips_pkg::*;
#(
  parameter string INIT_FILE = ""
) (
  input  logic        clk,
  input  logic        en,
  input  logic [10:0] adr,   // {glyph[6:0], line[3:0]}
  output logic [7:0]  dout
);

  localparam int unsigned DEPTH = FONT_CHARS * FONT_LINES;

  logic [7:0] mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++)
      mem[i] = 8'((i / FONT_LINES + FONT_FIRST_CHAR) ^ ((i % FONT_LINES) * 17));
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (en && 32'(adr) < DEPTH) dout <= mem[adr];
    else                   dout <= 8'h00;
  end

endmodule
