// pps_ex: execute stage.
//
// Runs the ALU on the decoded operands and registers the result together
// with a computed address: offset plus either operand 1 (loads, stores,
// register jumps) or the instruction's own address (conditional branches).
// A branch is confirmed when the instruction is a branch and bit 0 of the
// ALU test result is 1.  Branch-and-link instructions write back the
// instruction address + 4, and only when the branch is taken.  A signed
// ADD/SUB overflow raises IT_OVERF unless the instruction already carries a
// cause.  Clear loads a bubble; stop_all freezes the stage.  Latency one
// cycle.  This follows the original processor.
module pps_ex
  import mips_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic stop_all,
  input  logic clear,
  input  di_t  di,
  output ex_t  ex
);

  word_t res_ual, base_adr;
  logic  overflow_ual, pre_bra_confirm;

  alu u_alu (
    .clk      (clk),
    .rst      (rst),
    .en       (~stop_all & ~clear),
    .op1      (di.op1),
    .op2      (di.op2),
    .ctrl     (di.code_ual),
    .res      (res_ual),
    .overflow (overflow_ual)
  );

  assign base_adr        = di.mode ? di.adr : di.op1;
  assign pre_bra_confirm = di.bra & res_ual[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      ex <= '{adr: '0, bra_confirm: 1'b0, data_ual: '0, adresse: '0, adr_reg_dest: '0,
              ecr_reg: 1'b0, op_mem: 1'b0, r_w: 1'b0, exc_cause: IT_NOEXC,
              level: LVL_DI, it_ok: 1'b0};
    end else if (!stop_all) begin
      if (clear)
        ex <= '{adr: di.adr, bra_confirm: 1'b0, data_ual: '0, adresse: '0, adr_reg_dest: '0,
                ecr_reg: 1'b0, op_mem: 1'b0, r_w: 1'b0, exc_cause: IT_NOEXC,
                level: LVL_DI, it_ok: 1'b0};
      else
        ex <= '{adr:          di.adr,
                bra_confirm:  pre_bra_confirm,
                data_ual:     di.link ? di.adr + 32'd4 : res_ual,
                adresse:      di.offset + base_adr,
                adr_reg_dest: di.adr_reg_dest,
                ecr_reg:      di.link ? pre_bra_confirm : di.ecr_reg,
                op_mem:       di.op_mem,
                r_w:          di.r_w,
                exc_cause:    (di.exc_cause != IT_NOEXC) ? di.exc_cause :
                              (overflow_ual ? IT_OVERF : IT_NOEXC),
                level:        di.level,
                it_ok:        di.it_ok};
    end
  end

endmodule
