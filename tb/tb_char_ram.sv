// tb_char_ram: checks the 2560-byte character RAM: random writes and
// asynchronous reads against a model, covering the first and last cells,
// and that addresses beyond 2559 read zero and are not written.
module tb_char_ram;
  logic clk = 1'b0;
  logic [11:0] adr;
  logic we;
  logic [7:0] din, dout;
  logic [7:0] model [2560];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  char_ram dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    model = '{default: '0};
    we = 0; adr = 0; din = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      unique case (i % 4)
        0: adr = 12'd0 + 12'($urandom % 3);
        1: adr = 12'd2557 + 12'($urandom % 6);
        default: adr = $urandom;
      endcase
      we = $urandom; din = $urandom;
      #1 check(dout == ((adr < 2560) ? model[adr] : 8'h00), $sformatf("read %0d", adr));
      @(posedge clk);
      if (we && adr < 2560) model[adr] = din;
      #1 check(dout == ((adr < 2560) ? model[adr] : 8'h00), $sformatf("read after write %0d", adr));
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
