// pps_pf: program counter stage.
//
// Holds the address of the instruction being fetched.  Each cycle the pc
// becomes, in priority order, the exception vector (exch_cmd), the confirmed
// branch target (bra_cmd) or pc + 4.  It holds its value while the whole
// pipeline is frozen (stop_all, the wait register stall) and while a branch
// is being resolved or a data hazard is pending (stop_pf), but an exception
// or a confirmed branch overrides stop_pf.  Reset loads the boot address 0.
// Timing: the new pc is visible one clock edge after the command.  This
// follows the original processor.
module pps_pf
  import mips_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  stop_all,
  input  logic  bra_cmd,
  input  word_t bra_adr,
  input  logic  exch_cmd,
  input  word_t exch_adr,
  input  logic  stop_pf,
  output word_t pf_pc
);

  word_t suivant;
  logic  lock;

  always_comb begin
    if (exch_cmd)     suivant = exch_adr;
    else if (bra_cmd) suivant = bra_adr;
    else              suivant = pf_pc + 32'd4;

    if (stop_all)                lock = 1'b1;
    else if (exch_cmd || bra_cmd) lock = 1'b0;
    else                         lock = stop_pf;
  end

  always_ff @(posedge clk) begin
    if (rst)       pf_pc <= ADR_INIT;
    else if (!lock) pf_pc <= suivant;
  end

endmodule
