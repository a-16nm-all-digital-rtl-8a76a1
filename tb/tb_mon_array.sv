// tb_mon_array: self-checking test of one array with four datapaths. The
// control word is built field by field and scanned in; an alternating pattern
// is loaded; path 2 is given slow rising edges (five stages of 150 ps, more
// than one 546 ps clock period) and path 1 slow falling edges. Measuring path
// 2 must count one data '1' error for every '1' bit in the window and no '0'
// errors; measuring path 1 the opposite; path 0 none; a stressed path none.
// The expected counts come from the window length in clocks (one bit per two
// clocks, half of them '1').
`timescale 1ps/1ps
module tb_mon_array;
  import em_ber_pkg::*;
  localparam int unsigned NP = 4, PW = 32, CW = 10;
  localparam int unsigned LEN = scan_len(NP, PW);
  logic rst_n = 1'b1, phi1 = 1'b0, phi2 = 1'b0, si = 1'b0, so;
  logic vco_en = 1'b0, load = 1'b0, win = 1'b0, clr = 1'b0;
  int unsigned vdd = 800;
  int unsigned rise [NP];
  int unsigned fall [NP];
  logic vclk;
  logic [CW-1:0] c0, c1;
  logic [LEN-1:0] cfg_w, got;
  int checks = 0, failures = 0;

  mon_array #(.N_PATHS(NP), .N_STAGES(5), .PAT_W(PW), .CNT_W(CW), .VCO_STAGES(7)) dut (
    .rst_n(rst_n), .phi1(phi1), .phi2(phi2), .scan_in(si), .scan_out(so),
    .vco_en_i(vco_en), .vco_vdd_mv_i(vdd), .pat_load_i(load), .win_en_i(win),
    .cnt_clr_i(clr), .rise_ps_i(rise), .fall_ps_i(fall), .vco_clk_o(vclk),
    .cnt0_o(c0), .cnt1_o(c1));

  function automatic logic [LEN-1:0] make_cfg(input logic [PW-1:0] pat, input logic pol,
                                               input logic [NP-1:0] stress, input logic [NP-1:0] meas);
    logic [LEN-1:0] w;
    w = '0;
    for (int b = 0; b < PW; b++) w[b] = pat[b];
    w[PW] = pol;
    for (int p = 0; p < NP; p++) begin
      w[PW + 1 + p]      = stress[p];
      w[PW + 1 + NP + p] = meas[p];
    end
    return w;
  endfunction

  task automatic scan_word(input logic [LEN-1:0] w, output logic [LEN-1:0] out_w);
    for (int i = LEN - 1; i >= 0; i--) begin
      out_w[i] = so;
      si = w[i];
      #100 phi1 = 1'b1; #100 phi1 = 1'b0;
      #100 phi2 = 1'b1; #100 phi2 = 1'b0;
    end
  endtask

  task automatic measure(input string name, input int ncyc, input int exp0, input int exp1);
    @(negedge vclk) clr = 1'b1;
    @(negedge vclk) clr = 1'b0;
    repeat (4) @(negedge vclk);
    win = 1'b1;
    repeat (ncyc) @(negedge vclk);
    win = 1'b0;
    repeat (6) @(negedge vclk);
    checks += 2;
    if (int'(c0) < exp0 - 1 || int'(c0) > exp0 + 1) begin failures++; $display("FAIL %s cnt0=%0d exp=%0d", name, c0, exp0); end
    if (int'(c1) < exp1 - 1 || int'(c1) > exp1 + 1) begin failures++; $display("FAIL %s cnt1=%0d exp=%0d", name, c1, exp1); end
    $display("%s: cnt0=%0d cnt1=%0d", name, c0, c1);
  endtask

  initial begin
    for (int p = 0; p < NP; p++) begin rise[p] = 40; fall[p] = 40; end
    rise[2] = 150;
    fall[1] = 150;
    #500 rst_n = 1'b1; clr = 1'b0;
    cfg_w = make_cfg(32'h5555_5555, 1'b0, 4'b0000, 4'b0100);
    scan_word(cfg_w, got);
    vco_en = 1'b1;
    repeat (5) @(negedge vclk);
    load = 1'b1; repeat (4) @(negedge vclk); load = 1'b0;
    repeat (4) @(negedge vclk);
    measure("path2 slow rise", 400, 0, 100);
    scan_word(make_cfg(32'h5555_5555, 1'b0, 4'b0000, 4'b0010), got);
    checks++;
    if (got !== cfg_w) begin failures++; $display("FAIL scan out"); end
    measure("path1 slow fall", 400, 100, 0);
    scan_word(make_cfg(32'h5555_5555, 1'b0, 4'b0000, 4'b0001), got);
    measure("path0 fast", 400, 0, 0);
    scan_word(make_cfg(32'h5555_5555, 1'b0, 4'b0100, 4'b0100), got);
    measure("path2 stressed", 400, 0, 0);
    checks++;
    if (dut.g_grp[2].u_grp.dut_out !== 1'b1) begin failures++; $display("FAIL stress level"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Assert the asynchronous reset/clear with an edge after time 0, so that
  // flip-flops starting at random values are cleared.
  initial begin
    #1;
    rst_n = 1'b0;
    clr = 1'b1;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
