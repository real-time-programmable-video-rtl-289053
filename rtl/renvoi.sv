// renvoi: bypass (forwarding) and hazard unit.
//
// For each operand the decode stage asks for, it looks for the youngest
// in-flight writer of the same register (decode output, then execute
// output, then memory output; register 0 and unused operands never match)
// and forwards that stage's value instead of the bank's.  Each writer
// carries the level at which its result exists: a dependency on a writer
// that has not produced its value yet (a load still in execute, an ALU
// result still in decode) is unresolved and raises `alea`, which freezes
// the pc and extraction stages and sends a bubble down from decode.
//
// It also routes the memory stage's result to the general register bank or
// to the system coprocessor (bit 5 of the destination), and suppresses
// general register writes while an exception clears the pipeline.  All
// combinational.  This follows the original processor.
module renvoi
  import mips_pkg::*;
(
  input  reg_adr_t   adr1,
  input  reg_adr_t   adr2,
  input  logic       use1,
  input  logic       use2,
  output word_t      data1,
  output word_t      data2,
  output logic       alea,
  input  level_e     di_level,
  input  reg_adr_t   di_adr,
  input  logic       di_ecr,
  input  word_t      di_data,
  input  level_e     ex_level,
  input  reg_adr_t   ex_adr,
  input  logic       ex_ecr,
  input  word_t      ex_data,
  input  level_e     mem_level,
  input  reg_adr_t   mem_adr,
  input  logic       mem_ecr,
  input  word_t      mem_data,
  input  logic       exc_taken,
  output word_t      write_data,
  output logic [4:0] write_adr,
  output logic       write_gpr,
  output logic       write_scp,
  output logic [4:0] read_adr1,
  output logic [4:0] read_adr2,
  input  word_t      read_data1_gpr,
  input  word_t      read_data1_scp,
  input  word_t      read_data2_gpr,
  input  word_t      read_data2_scp
);

  level_e dep_r1, dep_r2;
  word_t  read_data1, read_data2;
  logic   res1, res2;

  assign write_data = mem_data;
  assign write_adr  = mem_adr[4:0];
  assign write_gpr  = ~mem_adr[5] & mem_ecr & ~exc_taken;
  assign write_scp  = mem_adr[5] & mem_ecr;
  assign read_adr1  = adr1[4:0];
  assign read_adr2  = adr2[4:0];

  // Stage holding the youngest writer of register `adr`
  function automatic level_e dependency(reg_adr_t adr, logic use_it, reg_adr_t d_adr,
                                        logic d_ecr, reg_adr_t e_adr, logic e_ecr,
                                        reg_adr_t m_adr, logic m_ecr);
    if (adr[4:0] == 5'd0 || !use_it) return LVL_REG;
    if (adr == d_adr && d_ecr)       return LVL_DI;
    if (adr == e_adr && e_ecr)       return LVL_EX;
    if (adr == m_adr && m_ecr)       return LVL_MEM;
    return LVL_REG;
  endfunction

  // Is the value already available in the stage that holds the writer?
  function automatic logic resolved(level_e dep, level_e d_lvl, level_e e_lvl, level_e m_lvl);
    unique case (dep)
      LVL_REG: return 1'b1;
      LVL_MEM: return m_lvl >= LVL_MEM;
      LVL_EX:  return e_lvl >= LVL_EX;
      LVL_DI:  return d_lvl >= LVL_DI;
    endcase
  endfunction

  always_comb begin
    dep_r1     = dependency(adr1, use1, di_adr, di_ecr, ex_adr, ex_ecr, mem_adr, mem_ecr);
    dep_r2     = dependency(adr2, use2, di_adr, di_ecr, ex_adr, ex_ecr, mem_adr, mem_ecr);
    read_data1 = adr1[5] ? read_data1_scp : read_data1_gpr;
    read_data2 = adr2[5] ? read_data2_scp : read_data2_gpr;
    unique case (dep_r1)
      LVL_REG: data1 = read_data1;
      LVL_MEM: data1 = mem_data;
      LVL_EX:  data1 = ex_data;
      LVL_DI:  data1 = di_data;
    endcase
    unique case (dep_r2)
      LVL_REG: data2 = read_data2;
      LVL_MEM: data2 = mem_data;
      LVL_EX:  data2 = ex_data;
      LVL_DI:  data2 = di_data;
    endcase
    res1 = resolved(dep_r1, di_level, ex_level, mem_level);
    res2 = resolved(dep_r2, di_level, ex_level, mem_level);
    alea = ~res1 | ~res2;
  end

endmodule
