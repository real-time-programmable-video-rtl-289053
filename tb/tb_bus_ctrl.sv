// tb_bus_ctrl: random loads and stores over the whole address map, checked
// against a reference model of the decoder and the memories behind it.
//  * Loads: data RAM word (index = address bits 7:0), character RAM byte
//    (zero-extended), zero for unmapped addresses; same-cycle data.
//  * Stores: written at the edge unless stop_all is high.
//  * Video strobes: a store to 0x4001..0x4004 gives the matching one-cycle
//    strobe(s) in the next cycle; a store into 0x2000..0x200F gives the load
//    strobe and, in the same cycle, the font byte for (data - 32, line).
//    Loads, and any access while stop_all is high, give no strobe.
//  * Instruction port: word at address bits 9:2.
module tb_bus_ctrl;
  import mips_pkg::*;
  logic clk = 1'b0, rst = 1'b1, stop_all;
  word_t adr_from_ei, instr_to_ei, adr_from_mem, data_from_mem, data_to_mem;
  logic req_from_mem, r_w_from_mem;
  logic load_to_video, vsync_to_video, hsync_to_video, blank_to_video;
  logic [7:0] byte_to_video;
  word_t ram [256];
  logic [7:0] chr [2560];
  int checks = 0, failures = 0;
  int n_load = 0, n_h = 0, n_v = 0, n_b = 0, n_hv = 0;

  always #5 clk = ~clk;
  bus_ctrl dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] font(logic [7:0] c, logic [3:0] line);
    return (c >= 32 && c < 128) ? 8'(c ^ (line * 17)) : 8'h00;
  endfunction

  function automatic word_t rand_adr();
    int unsigned k = $urandom % 10;
    unique case (k)
      0, 1: return word_t'($urandom % 512);
      2, 3: return 32'h1000 + word_t'($urandom % 2560);
      4: return 32'h2000 + word_t'($urandom % 16);
      5: return 32'h4001 + word_t'($urandom % 4);
      6: return 32'h4000;
      7: return word_t'($urandom % 32'h8000);
      8: return 32'h0001_0000 | word_t'($urandom % 512);
      default: return 32'h1a00 + word_t'($urandom % 512);
    endcase
  endfunction

  initial begin
    stop_all = 0; req_from_mem = 0; r_w_from_mem = 0; adr_from_mem = 0; data_from_mem = 0; adr_from_ei = 0;
    for (int i = 0; i < 256; i++) ram[i] = dut.u_ram.mem[i];
    chr = '{default: '0};
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 30000; i++) begin
      logic st, exp_load, exp_h, exp_v, exp_b; logic [7:0] exp_byte; word_t exp_rd;
      req_from_mem = $urandom % 5 != 0;
      r_w_from_mem = $urandom;
      adr_from_mem = rand_adr();
      data_from_mem = ($urandom % 2) ? word_t'(32 + $urandom % 96) : word_t'($urandom);
      stop_all = $urandom % 6 == 0;
      adr_from_ei = $urandom % 1024;
      #1;
      check(instr_to_ei == ram[adr_from_ei[9:2]], "instruction port");
      exp_rd = 0;
      if (req_from_mem && adr_from_mem < 32'h200) exp_rd = ram[adr_from_mem[7:0]];
      else if (req_from_mem && adr_from_mem >= 32'h1000 && adr_from_mem < 32'h1a00) exp_rd = {24'h0, chr[adr_from_mem - 32'h1000]};
      check(data_to_mem == exp_rd, $sformatf("read %h", adr_from_mem));
      st = req_from_mem && r_w_from_mem && !stop_all;
      exp_load = st && adr_from_mem[31:4] == 28'h0000200;
      exp_byte = exp_load ? font(data_from_mem[7:0], adr_from_mem[3:0]) : 8'h00;
      exp_b = st && adr_from_mem == 32'h4001;
      exp_h = st && (adr_from_mem == 32'h4002 || adr_from_mem == 32'h4004);
      exp_v = st && (adr_from_mem == 32'h4003 || adr_from_mem == 32'h4004);
      @(posedge clk);
      if (st && adr_from_mem < 32'h200) ram[adr_from_mem[7:0]] = data_from_mem;
      if (st && adr_from_mem >= 32'h1000 && adr_from_mem < 32'h1a00) chr[adr_from_mem - 32'h1000] = data_from_mem[7:0];
      #1;
      check(load_to_video == exp_load, "load strobe");
      check(byte_to_video == exp_byte, $sformatf("font byte %h", byte_to_video));
      check(blank_to_video == exp_b && hsync_to_video == exp_h && vsync_to_video == exp_v, "sync strobes");
      n_load += exp_load; n_b += exp_b; n_h += exp_h && !exp_v; n_v += exp_v && !exp_h; n_hv += exp_h && exp_v;
      @(negedge clk);
      req_from_mem = 0;
      @(posedge clk); #1;
      check(!load_to_video && !blank_to_video && !hsync_to_video && !vsync_to_video, "strobes last one cycle");
      @(negedge clk);
    end
    check(n_load > 0 && n_b > 0 && n_h > 0 && n_v > 0 && n_hv > 0, "all strobes seen");
    $display("load=%0d blank=%0d hsync=%0d vsync=%0d both=%0d", n_load, n_b, n_h, n_v, n_hv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
