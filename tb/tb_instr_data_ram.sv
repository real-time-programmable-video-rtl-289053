// tb_instr_data_ram: checks the dual-port program/data RAM.
//  * Start-up content: the first words equal the program image.
//  * Random writes on port B and reads on both ports against a model;
//    both ports read asynchronously (same-cycle data) and a write becomes
//    visible on both ports right after the clock edge, never before it.
module tb_instr_data_ram;
  import mips_pkg::*;
  logic clk = 1'b0;
  logic [7:0] adr_a, adr_b;
  logic we_b;
  word_t di_b, do_a, do_b;
  word_t model [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  instr_data_ram dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    we_b = 0; adr_a = 0; adr_b = 1; di_b = 0;
    #1;
    check(do_a == 32'h20140050, "program word 0");
    adr_a = 1; #1 check(do_a == 32'h201f0060, "program word 1");
    for (int i = 0; i < 256; i++) model[i] = dut.mem[i];
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      adr_a = $urandom; adr_b = $urandom; we_b = $urandom; di_b = $urandom;
      #1;
      check(do_a == model[adr_a], "port A read");
      check(do_b == model[adr_b], "port B read before write");
      @(posedge clk);
      if (we_b) model[adr_b] = di_b;
      #1;
      check(do_b == model[adr_b], "port B after write");
      check(do_a == model[adr_a], "port A after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
