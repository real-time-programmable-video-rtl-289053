// pps_mem: memory access stage.
//
// Drives the bus controller with the address, store data and read/write
// direction from the execute stage, and requests an access for loads and
// stores unless the pipeline is being cleared.  Memory answers in the same
// cycle (mtc_* out, ctm_data in); the stage registers either the loaded word
// or the ALU result as the value to write back.  Clear loads a bubble,
// stop_all freezes the register.  This follows the original processor.
module pps_mem
  import mips_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  stop_all,
  input  logic  clear,
  output word_t mtc_data,
  output word_t mtc_adr,
  output logic  mtc_r_w,
  output logic  mtc_req,
  input  word_t ctm_data,
  input  ex_t   ex,
  output mem_t  mem
);

  assign mtc_adr  = ex.adresse;
  assign mtc_r_w  = ex.r_w;
  assign mtc_data = ex.data_ual;
  assign mtc_req  = ex.op_mem & ~clear;

  always_ff @(posedge clk) begin
    if (rst) begin
      mem <= '{adr: '0, adr_reg_dest: '0, ecr_reg: 1'b0, data_ecr: '0,
               exc_cause: IT_NOEXC, level: LVL_DI, it_ok: 1'b0};
    end else if (!stop_all) begin
      if (clear)
        mem <= '{adr: ex.adr, adr_reg_dest: '0, ecr_reg: 1'b0, data_ecr: '0,
                 exc_cause: IT_NOEXC, level: LVL_DI, it_ok: 1'b0};
      else
        mem <= '{adr: ex.adr, adr_reg_dest: ex.adr_reg_dest, ecr_reg: ex.ecr_reg,
                 data_ecr: ex.op_mem ? ctm_data : ex.data_ual,
                 exc_cause: ex.exc_cause, level: ex.level, it_ok: ex.it_ok};
    end
  end

endmodule
