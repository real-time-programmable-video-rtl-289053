// char_ram: character RAM, one byte per screen cell.
//
// 2560 bytes (2.5 KB), enough for the 80 x 30 text screen (2400 cells) with
// room to spare; each byte is the ASCII code shown at that cell, row-major.
// The processor reads it with loads and writes it with stores.  Read is
// asynchronous so that a load completes within the memory stage; writes
// happen at the clock edge.  The original used five 512 x 8 block RAMs; one
// array is used here.  Initial content: INIT_FILE (hex bytes) if given,
// otherwise all zero.
module char_ram #(
  parameter int unsigned DEPTH     = 2560,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] adr,
  input  logic                     we,
  input  logic [7:0]               din,
  output logic [7:0]               dout
);

  logic [7:0] mem [DEPTH];

  initial begin
    mem = '{default: '0};
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign dout = (32'(adr) < DEPTH) ? mem[adr] : 8'h00;

  always_ff @(posedge clk) begin
    if (we && 32'(adr) < DEPTH) mem[adr] <= din;
  end

endmodule
