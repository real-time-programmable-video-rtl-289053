// pps_ei: instruction extraction stage.
//
// Presents the pc to the instruction memory (etc_adr, read in the same
// cycle) and registers the returned instruction with its address.  A clear
// (exception) loads a NOP with interrupts disallowed; genop (a branch in the
// decode or execute stage) loads a NOP; stop_ei (an unresolved data hazard)
// holds the register; stop_all freezes it.  Reset loads a NOP at address 0.
// This follows the original processor.
module pps_ei
  import mips_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  clear,
  input  logic  stop_all,
  input  logic  stop_ei,
  input  logic  genop,
  input  word_t cte_instr,   // instruction from memory
  output word_t etc_adr,     // address to memory
  input  word_t pf_pc,
  output word_t ei_instr,
  output word_t ei_adr,
  output logic  ei_it_ok
);

  assign etc_adr = pf_pc;

  always_ff @(posedge clk) begin
    if (rst) begin
      ei_instr <= INS_NOP;
      ei_adr   <= '0;
      ei_it_ok <= 1'b0;
    end else if (!stop_all) begin
      if (clear) begin
        ei_instr <= INS_NOP;
        ei_it_ok <= 1'b0;
      end else if (!stop_ei) begin
        ei_instr <= genop ? INS_NOP : cte_instr;
        if (!genop) ei_adr <= pf_pc;
        ei_it_ok <= 1'b1;
      end
    end
  end

endmodule
