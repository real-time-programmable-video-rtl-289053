// instr_data_ram: shared instruction and data memory, 256 words of 32 bits.
//
// A dual-port RAM: port A only reads and feeds the instruction extraction
// stage, port B reads and writes data for the memory stage, so a load or
// store never competes with an instruction fetch.  In the original board
// design this was a pair of 256 x 16 block RAMs side by side, one for each
// half-word.  Both ports read asynchronously (the word appears in the same
// cycle as its address) because the pipeline's fetch and memory stages
// expect their data within the cycle; the write on port B happens at the
// clock edge.  The content at start-up is read from INIT_FILE (hex words),
// the processor's program.
module instr_data_ram
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH     = 256,
  parameter string       INIT_FILE = "rtl/rtproc_prog.hex"
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] adr_a,
  output word_t                    do_a,
  input  logic [$clog2(DEPTH)-1:0] adr_b,
  input  logic                     we_b,
  input  word_t                    di_b,
  output word_t                    do_b
);

  word_t mem [DEPTH];

  initial begin
    mem = '{default: '0};
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign do_a = mem[adr_a];
  assign do_b = mem[adr_b];

  always_ff @(posedge clk) begin
    if (we_b) mem[adr_b] <= di_b;
  end

endmodule
