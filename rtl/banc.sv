// banc: register file with the wait register.
//
// Registers 1 to 30 are ordinary MIPS registers; register 0 reads zero.
// Register 31 is the wait register, the mechanism that gives the processor
// predictable timing: writing N to it (e.g. `addi $31, $0, N`) starts a
// down-counter, and a later write to it may only complete once N cycles
// have passed since the previous one.  Until then `stop_all` is asserted
// and freezes every pipeline stage, so the write (and the instruction
// behind it, typically a store that toggles a video signal) happens exactly
// N cycles after the previous write, provided the code in between took
// fewer cycles.
//
// The counter holds the number of cycles left in the current interval,
// including the present one: it is loaded with N, decremented every cycle
// while non-zero, and a new write completes in a cycle where it is 0 or 1.
// Reading register 31 returns the counter.  Two reads are combinational,
// one write per cycle at the clock edge.  stop_all is combinational from
// registered state (the write request comes from the memory stage output
// register), so the frozen write request stays on the write port and no
// auxiliary latch is needed.  The original register file latched stop_all
// and lost the stalled write; the combinational stall and the "0 or 1" rule
// (which makes the interval exactly N cycles rather than N + 1) are this
// design's choices.
module banc
  import mips_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [4:0] reg_src1,
  input  logic [4:0] reg_src2,
  input  logic [4:0] reg_dest,
  input  word_t      donnee,
  input  logic       cmd_ecr,
  output word_t      data_src1,
  output word_t      data_src2,
  output logic       stop_all
);

  word_t registres [1:30];
  word_t wait_reg;
  logic  wr_wait;

  assign data_src1 = (reg_src1 == 5'd0) ? '0 : (reg_src1 == WAIT_REG) ? wait_reg : registres[reg_src1];
  assign data_src2 = (reg_src2 == 5'd0) ? '0 : (reg_src2 == WAIT_REG) ? wait_reg : registres[reg_src2];

  assign wr_wait  = cmd_ecr && (reg_dest == WAIT_REG);
  assign stop_all = wr_wait && (wait_reg > 32'd1);

  always_ff @(posedge clk) begin
    if (rst) begin
      registres <= '{default: '0};
    end else if (cmd_ecr && reg_dest != 5'd0 && reg_dest != WAIT_REG) begin
      registres[reg_dest] <= donnee;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)                        wait_reg <= '0;
    else if (wr_wait && !stop_all)  wait_reg <= donnee;
    else if (wait_reg != '0)        wait_reg <= wait_reg - 32'd1;
  end

endmodule
