// tb_font_rom: checks the font ROM's built-in pattern (byte = character
// code XOR 17 * line for characters 32..127) and its one-cycle read
// latency: the byte addressed before a rising edge appears after it, and
// with `en` low (or an address past the 96 glyphs) the output is zero.
module tb_font_rom;
  logic clk = 1'b0, en;
  logic [10:0] adr;
  logic [7:0] dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  font_rom dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [7:0] expect_next;
    en = 0; adr = 0;
    @(negedge clk);
    for (int i = 0; i < 6000; i++) begin
      logic [7:0] prev;
      adr = (i < 1536) ? 11'(i) : 11'($urandom);
      en = (i < 1536) ? 1'b1 : 1'b1 & ($urandom % 5 != 0);
      expect_next = (en && adr < 1536) ? 8'((adr / 16 + 32) ^ ((adr % 16) * 17)) : 8'h00;
      prev = dout;
      #1 check(dout == prev, "no change before the clock edge");
      @(posedge clk); #1;
      check(dout == expect_next, $sformatf("adr %0d en %0d: %h != %h", adr, en, dout, expect_next));
      @(negedge clk);
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
