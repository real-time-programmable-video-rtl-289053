// minimips: the pipelined processor with its bus controller.
//
// Five stages: pc (pps_pf), instruction extraction (pps_ei), decode
// (pps_di), execute (pps_ex, with the ALU) and memory access (pps_mem),
// whose output register writes the register bank.  Around them: the bypass
// unit (renvoi), the register file with the wait register (banc), the
// system coprocessor (syscop) and the bus controller (bus_ctrl), which holds
// all memories and drives the video controller's strobes.
//
// Control:
//  - stop_all, from the wait register, freezes every stage and the video
//    strobes until the wait interval has elapsed;
//  - alea, an unresolved data hazard, holds pc and extraction and sends a
//    bubble from decode;
//  - a branch in extraction (bra_detect), decode (DI bra) or execute
//    (confirm) holds the pc and feeds NOPs into extraction; a confirmed
//    branch loads the target.  A taken branch therefore costs three bubble
//    cycles and an untaken one two; there is no delay slot;
//  - exc_taken (an exception, an enabled hardware interrupt or an interrupt
//    return) clears the pipeline and jumps to the coprocessor's vector.
// The hardware interrupt input is sampled by a register before use.
// Structure and control follow the original processor.
module minimips
  import mips_pkg::*;
#(
  parameter string PROG_FILE = "rtl/rtproc_prog.hex",
  parameter string FONT_FILE = ""
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       it_mat,
  output logic       load_to_video,
  output logic       vsync_to_video,
  output logic       hsync_to_video,
  output logic       blank_to_video,
  output logic [7:0] byte_to_video,
  output logic       stop_all        // wait register stall, for observation
);

  logic       it_mat_clk, stop_pf, genop, bra_detect, use1, use2, alea, exc_taken;
  word_t      pf_pc, cte_instr, etc_adr, ei_instr, ei_adr, data1, data2;
  logic       ei_it_ok;
  reg_adr_t   adr_reg1, adr_reg2;
  di_t        di;
  ex_t        ex;
  mem_t       mem;
  word_t      mtc_data, mtc_adr, ctm_data, vecteur_it, write_data;
  logic       mtc_r_w, mtc_req, write_gpr, write_scp;
  logic [4:0] write_adr, read_adr1, read_adr2;
  word_t      read_data1_gpr, read_data2_gpr, read_data1_scp, read_data2_scp;

  assign stop_pf = di.bra | bra_detect | alea;
  assign genop   = bra_detect | ex.bra_confirm | di.bra;

  always_ff @(posedge clk) begin
    if (rst) it_mat_clk <= 1'b0;
    else     it_mat_clk <= it_mat;
  end

  pps_pf u_pf (
    .clk(clk), .rst(rst), .stop_all(stop_all),
    .bra_cmd(ex.bra_confirm), .bra_adr(ex.adresse),
    .exch_cmd(exc_taken), .exch_adr(vecteur_it),
    .stop_pf(stop_pf), .pf_pc(pf_pc)
  );

  pps_ei u_ei (
    .clk(clk), .rst(rst), .clear(exc_taken), .stop_all(stop_all), .stop_ei(alea),
    .genop(genop), .cte_instr(cte_instr), .etc_adr(etc_adr), .pf_pc(pf_pc),
    .ei_instr(ei_instr), .ei_adr(ei_adr), .ei_it_ok(ei_it_ok)
  );

  pps_di u_di (
    .clk(clk), .rst(rst), .stop_all(stop_all), .clear(exc_taken),
    .bra_detect(bra_detect), .adr_reg1(adr_reg1), .adr_reg2(adr_reg2),
    .use1(use1), .use2(use2), .stop_di(alea), .data1(data1), .data2(data2),
    .ei_adr(ei_adr), .ei_instr(ei_instr), .ei_it_ok(ei_it_ok), .di(di)
  );

  pps_ex u_ex (
    .clk(clk), .rst(rst), .stop_all(stop_all), .clear(exc_taken), .di(di), .ex(ex)
  );

  pps_mem u_mem (
    .clk(clk), .rst(rst), .stop_all(stop_all), .clear(exc_taken),
    .mtc_data(mtc_data), .mtc_adr(mtc_adr), .mtc_r_w(mtc_r_w), .mtc_req(mtc_req),
    .ctm_data(ctm_data), .ex(ex), .mem(mem)
  );

  renvoi u_renvoi (
    .adr1(adr_reg1), .adr2(adr_reg2), .use1(use1), .use2(use2),
    .data1(data1), .data2(data2), .alea(alea),
    .di_level(di.level), .di_adr(di.adr_reg_dest), .di_ecr(di.ecr_reg), .di_data(di.op2),
    .ex_level(ex.level), .ex_adr(ex.adr_reg_dest), .ex_ecr(ex.ecr_reg), .ex_data(ex.data_ual),
    .mem_level(mem.level), .mem_adr(mem.adr_reg_dest), .mem_ecr(mem.ecr_reg),
    .mem_data(mem.data_ecr), .exc_taken(exc_taken),
    .write_data(write_data), .write_adr(write_adr), .write_gpr(write_gpr),
    .write_scp(write_scp), .read_adr1(read_adr1), .read_adr2(read_adr2),
    .read_data1_gpr(read_data1_gpr), .read_data1_scp(read_data1_scp),
    .read_data2_gpr(read_data2_gpr), .read_data2_scp(read_data2_scp)
  );

  banc u_banc (
    .clk(clk), .rst(rst), .reg_src1(read_adr1), .reg_src2(read_adr2),
    .reg_dest(write_adr), .donnee(write_data), .cmd_ecr(write_gpr),
    .data_src1(read_data1_gpr), .data_src2(read_data2_gpr), .stop_all(stop_all)
  );

  syscop u_syscop (
    .clk(clk), .rst(rst), .mem_adr(mem.adr), .mem_exc_cause(mem.exc_cause),
    .mem_it_ok(mem.it_ok), .it_mat(it_mat_clk), .exc_taken(exc_taken),
    .vecteur_it(vecteur_it), .write_data(write_data), .write_adr(write_adr),
    .write_scp(write_scp), .read_adr1(read_adr1), .read_adr2(read_adr2),
    .read_data1(read_data1_scp), .read_data2(read_data2_scp)
  );

  bus_ctrl #(.PROG_FILE(PROG_FILE), .FONT_FILE(FONT_FILE)) u_bus (
    .clk(clk), .rst(rst), .stop_all(stop_all),
    .adr_from_ei(etc_adr), .instr_to_ei(cte_instr),
    .req_from_mem(mtc_req), .r_w_from_mem(mtc_r_w), .adr_from_mem(mtc_adr),
    .data_from_mem(mtc_data), .data_to_mem(ctm_data),
    .load_to_video(load_to_video), .vsync_to_video(vsync_to_video),
    .hsync_to_video(hsync_to_video), .blank_to_video(blank_to_video),
    .byte_to_video(byte_to_video)
  );

endmodule
