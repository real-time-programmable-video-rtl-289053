// rtproc_monitor: checker shared by the end-to-end testbenches of
// rtproc_top.  It watches the top's outputs and, through hierarchical
// references, the processor's internal strobes, and checks them against
// what the video program must produce:
//  - the first six HSYNC# edges are 96, 704, 96, 704, 96, 704 cycles apart
//    (the wait values of the vertical sync code), and VSYNC# stays low for
//    1600 cycles (two 800-cycle lines);
//  - the n-th font load of the frame carries the font byte of the character
//    at row n/(81*16), line (n/81)%16, column n%81 (the program emits 81
//    loads per text line), with the character RAM filled by char_at();
//  - two loads are never closer than 8 cycles (the wait of the inner loop);
//  - RGB follows a reference model of the shift register and output
//    register;
// and counts how often each mechanism occurred: wait stalls, data hazard
// stalls, bypasses, taken branches, multiplies, character RAM reads, font
// loads, BLANK/HSYNC/VSYNC toggles.
module rtproc_monitor (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] vidout_red,
  input  logic [9:0] vidout_green,
  input  logic [9:0] vidout_blue,
  input  logic       vidout_blank_n,
  input  logic       vidout_hsync_n,
  input  logic       vidout_vsync_n,
  input  logic       stop_all,
  input  logic       load,
  input  logic [7:0] load_byte,
  input  logic       alea,
  input  logic       bypass,
  input  logic       branch_taken,
  input  logic       mult,
  input  logic       char_read
);

  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_stall = 0, n_alea = 0, n_bypass = 0, n_branch = 0, n_mult = 0, n_char = 0;
  int n_load = 0, n_blank = 0, n_hsync = 0, n_vsync = 0;
  longint hs_edge [$];
  longint vs_fall = -1, vs_rise = -1, last_load = -1;
  longint min_load_gap = 1 << 30, max_load_gap = 0;
  int gap_hist [int];
  logic hs_q = 1'b1, vs_q = 1'b1, bl_q = 1'b1;
  logic [7:0] sr_model = 8'h00;
  logic [9:0] rgb_model = '0;

  // Character placed at screen cell i (codes 32..127)
  function automatic logic [7:0] char_at(int i);
    return 8'(32 + (i * 7 + i / 80) % 96);
  endfunction

  function automatic logic [7:0] font_byte(logic [7:0] c, int line);
    return c ^ 8'(17 * line);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  always @(posedge clk) begin
    if (rst) begin
      cycle <= 0;
    end else begin
      cycle <= cycle + 1;
      if (stop_all)     n_stall++;
      if (alea)         n_alea++;
      if (bypass)       n_bypass++;
      if (branch_taken) n_branch++;
      if (mult)         n_mult++;
      if (char_read)    n_char++;

      // sync and blank edges
      if (vidout_hsync_n != hs_q) begin
        n_hsync++;
        hs_edge.push_back(cycle);
      end
      if (vidout_vsync_n != vs_q) begin
        n_vsync++;
        if (!vidout_vsync_n && vs_fall < 0) vs_fall = cycle;
        if (vidout_vsync_n && vs_fall >= 0 && vs_rise < 0) begin
          vs_rise = cycle;
          check(vs_rise - vs_fall == 1600, $sformatf("VSYNC low for %0d cycles, expected 1600", vs_rise - vs_fall));
        end
      end
      if (vidout_blank_n != bl_q) n_blank++;
      hs_q <= vidout_hsync_n;
      vs_q <= vidout_vsync_n;
      bl_q <= vidout_blank_n;

      // font loads
      if (load) begin
        automatic int grp  = n_load / 81;
        automatic int col  = n_load % 81;
        automatic int line = grp % 16;
        automatic int row  = grp / 16;
        automatic logic [7:0] exp_b = font_byte(char_at(row * 80 + col), line);
        check(load_byte == exp_b, $sformatf("load %0d (row %0d line %0d col %0d): byte %h, expected %h",
                                            n_load, row, line, col, load_byte, exp_b));
        if (last_load >= 0 && col != 0) begin
          if (cycle - last_load < min_load_gap) min_load_gap = cycle - last_load;
          if (cycle - last_load > max_load_gap) max_load_gap = cycle - last_load;
          gap_hist[int'(cycle - last_load)]++;
          check(cycle - last_load >= 8, $sformatf("loads %0d cycles apart", cycle - last_load));
        end
        last_load = cycle;
        n_load++;
      end

      // pixel path reference model
      check(vidout_red == rgb_model && vidout_green == rgb_model && vidout_blue == rgb_model,
            "RGB differs from the shift register model");
      rgb_model <= {10{sr_model[7]}};
      sr_model  <= load ? load_byte : {sr_model[6:0], sr_model[7]};
    end
  end

  // Final checks, called by the testbench
  task automatic finish_checks(int min_loads);
    automatic longint exp_gap [6] = '{96, 704, 96, 704, 96, 704};
    check(hs_edge.size() >= 7, $sformatf("only %0d HSYNC edges", hs_edge.size()));
    for (int i = 0; i < 6 && i + 1 < hs_edge.size(); i++)
      check(hs_edge[i+1] - hs_edge[i] == exp_gap[i],
            $sformatf("HSYNC edge %0d to %0d: %0d cycles, expected %0d", i, i + 1,
                      hs_edge[i+1] - hs_edge[i], exp_gap[i]));
    check(vs_rise >= 0, "VSYNC pulse never ended");
    check(n_load >= min_loads, $sformatf("%0d font loads, expected at least %0d", n_load, min_loads));
    check(n_stall > 0, "no wait-register stall");
    check(n_alea > 0, "no data hazard stall");
    check(n_bypass > 0, "no bypass");
    check(n_branch > 0, "no taken branch");
    check(n_mult > 0, "no multiply");
    check(n_char > 0, "no character RAM read");
    check(n_blank > 0, "no BLANK toggle");
    check(n_hsync > 0, "no HSYNC toggle");
    check(n_vsync > 0, "no VSYNC toggle");
    $display("cycles=%0d stall=%0d hazard=%0d bypass=%0d branch=%0d mult=%0d char_reads=%0d",
             cycle, n_stall, n_alea, n_bypass, n_branch, n_mult, n_char);
    $display("loads=%0d load_gap=%0d..%0d blank_edges=%0d hsync_edges=%0d vsync_edges=%0d",
             n_load, min_load_gap, max_load_gap, n_blank, n_hsync, n_vsync);
    foreach (gap_hist[g]) $display("  loads %0d cycles apart: %0d times", g, gap_hist[g]);
  endtask

endmodule
