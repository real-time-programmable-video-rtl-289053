// syscop: system coprocessor (exceptions and interrupts).
//
// Holds four registers of the coprocessor bank: 12 STATUS (bit 0 = interrupt
// enable), 13 CAUSE, 14 ADRESSE (address of the faulting instruction) and 15
// VECTIT (exception vector).  Writing register 0 is a command: SYS_UNMASK and
// SYS_MASK set and clear the enable, SYS_ITRET restores the enable saved at
// the last exception and jumps back to ADRESSE.  An instruction reaching the
// memory stage output with a cause other than IT_NOEXC, or an enabled
// hardware interrupt (it_mat) on an instruction that allows one, raises
// `exc_taken`: the pipeline is cleared and the pc jumps to vecteur_it.
// CAUSE and ADRESSE are recorded and interrupts masked on the same edge.
// SYS_ITRET raises `exc_taken` too, so that the pipeline is cleared
// before the jump back.  Reads of other registers return zero.  Registers update every clock;
// reset clears them.  This follows the original processor.
module syscop
  import mips_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  word_t      mem_adr,
  input  word_t      mem_exc_cause,
  input  logic       mem_it_ok,
  input  logic       it_mat,
  output logic       exc_taken,
  output word_t      vecteur_it,
  input  word_t      write_data,
  input  logic [4:0] write_adr,
  input  logic       write_scp,
  input  logic [4:0] read_adr1,
  input  logic [4:0] read_adr2,
  output word_t      read_data1,
  output word_t      read_data2
);

  localparam int unsigned COMMAND = 0;
  localparam int unsigned STATUS  = 12;
  localparam int unsigned CAUSE   = 13;
  localparam int unsigned ADRESSE = 14;
  localparam int unsigned VECTIT  = 15;

  word_t scp_reg [12:15];
  word_t pre_reg [12:15];
  logic  exception, interruption, cmd_itret, save_msk;

  assign exception    = (mem_exc_cause != IT_NOEXC);
  assign interruption = it_mat & scp_reg[STATUS][0] & mem_it_ok;
  assign exc_taken    = exception | interruption | cmd_itret;
  assign vecteur_it   = cmd_itret ? scp_reg[ADRESSE] : scp_reg[VECTIT];

  assign read_data1 = (read_adr1 >= 5'd12 && read_adr1 <= 5'd15) ? scp_reg[read_adr1] : '0;
  assign read_data2 = (read_adr2 >= 5'd12 && read_adr2 <= 5'd15) ? scp_reg[read_adr2] : '0;

  always_comb begin
    pre_reg   = scp_reg;
    cmd_itret = 1'b0;
    if (write_scp && write_adr >= 5'd12 && write_adr <= 5'd15)
      pre_reg[write_adr] = write_data;
    if (write_scp && write_adr == 5'(COMMAND)) begin
      unique case (write_data)
        SYS_UNMASK: pre_reg[STATUS][0] = 1'b1;
        SYS_MASK:   pre_reg[STATUS][0] = 1'b0;
        SYS_ITRET: begin
          pre_reg[STATUS][0] = save_msk;
          cmd_itret = 1'b1;
        end
        default: ;
      endcase
    end
    if (interruption) begin
      pre_reg[STATUS][0] = 1'b0;
      pre_reg[CAUSE]     = IT_ITMAT;
      pre_reg[ADRESSE]   = mem_adr;
    end
    if (exception) begin
      pre_reg[STATUS][0] = 1'b0;
      pre_reg[CAUSE]     = mem_exc_cause;
      pre_reg[ADRESSE]   = mem_adr;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      scp_reg  <= '{default: '0};
      save_msk <= 1'b0;
    end else begin
      scp_reg <= pre_reg;
      if (exception || interruption) save_msk <= scp_reg[STATUS][0];
    end
  end

endmodule
