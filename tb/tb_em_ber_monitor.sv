// tb_em_ber_monitor: end-to-end test of the whole monitor at its default size
// (two arrays of 48 datapaths, 5 stages, 32-bit pattern, 10-bit counters).
//
// The testbench plays the bench controller: it builds the control word for
// both arrays, scans it in with two-phase clocks, loads the patterns, opens
// error windows and reads the counters. Path delays stand for wire
// resistance: a stage delay of 150 ps (750 ps over five stages) exceeds the
// 546 ps clock period at 800 mV, 40-60 ps stages do not. Expected counts come
// from the window length W in clocks: W/2 bits, so W/4 '1' bits with the
// alternating pattern and W/8 falling transitions with 0011. Every mechanism
// (scan load and read-back, pattern load, data '1' and data '0' errors,
// counter wrap-around, frequency change, stress in both polarities with the
// measurement blocked, VCO power-down, counter clear, a resistance shift that
// makes a clean path fail) is counted and must occur at least once.
`timescale 1ps/1ps
module tb_em_ber_monitor;
  import em_ber_pkg::*;
  localparam int unsigned NA = N_ARRAYS_DEF, NP = N_PATHS_DEF, PW = PAT_W_DEF, CW = CNT_W_DEF;
  localparam int unsigned LEN = scan_len(NP, PW);
  localparam int unsigned TOT = NA * LEN;

  logic rst_n = 1'b1, phi1 = 1'b0, phi2 = 1'b0, si = 1'b0, so;
  logic vco_en [NA], load [NA], win [NA], clr [NA];
  int unsigned vdd [NA];
  int unsigned rise [NA][NP];
  int unsigned fall [NA][NP];
  logic vclk [NA];
  logic [CW-1:0] c0 [NA];
  logic [CW-1:0] c1 [NA];
  logic path_out [NA][NP];
  logic [TOT-1:0] last_w;
  int checks = 0, failures = 0;

  typedef enum int {M_SCAN, M_SCAN_OUT, M_PAT_LOAD, M_ERR1, M_ERR0, M_WRAP, M_FREQ,
                    M_STRESS_POL0, M_STRESS_POL1, M_STRESS_BLOCK, M_VCO_OFF, M_CLEAR,
                    M_DEGRADE, M_NUM} mech_e;
  int mech [M_NUM];

  // Per-array control, as the bench holds it.
  typedef struct {
    logic [PW-1:0] pat;
    logic          pol;
    logic [NP-1:0] stress;
    logic [NP-1:0] meas;
  } arr_cfg_t;
  arr_cfg_t acfg [NA];

  em_ber_monitor dut (
    .rst_n(rst_n), .scan_phi1(phi1), .scan_phi2(phi2), .scan_in(si), .scan_out(so),
    .vco_en(vco_en), .vco_vdd_mv(vdd), .pat_load(load), .win_en(win), .cnt_clr(clr),
    .rise_ps(rise), .fall_ps(fall), .vco_clk(vclk), .err0_cnt(c0), .err1_cnt(c1));

  for (genvar a = 0; a < NA; a++) begin : g_pa
    for (genvar p = 0; p < NP; p++) begin : g_pp
      assign path_out[a][p] = dut.g_arr[a].u_arr.g_grp[p].u_grp.dut_out;
    end
  end

  function automatic logic [TOT-1:0] make_word();
    logic [TOT-1:0] w;
    w = '0;
    for (int a = 0; a < NA; a++) begin
      for (int b = 0; b < PW; b++) w[a*LEN + b] = acfg[a].pat[b];
      w[a*LEN + PW] = acfg[a].pol;
      for (int p = 0; p < NP; p++) begin
        w[a*LEN + PW + 1 + p]      = acfg[a].stress[p];
        w[a*LEN + PW + 1 + NP + p] = acfg[a].meas[p];
      end
    end
    return w;
  endfunction

  // Scan the whole chain; the bits coming out must be the previous word.
  task automatic scan_all();
    logic [TOT-1:0] w, got;
    w = make_word();
    for (int i = TOT - 1; i >= 0; i--) begin
      got[i] = so;
      si = w[i];
      #100 phi1 = 1'b1; #100 phi1 = 1'b0;
      #100 phi2 = 1'b1; #100 phi2 = 1'b0;
    end
    checks++;
    if (got !== last_w) begin failures++; $display("FAIL scan read-back"); end
    else mech[M_SCAN_OUT]++;
    last_w = w;
    mech[M_SCAN]++;
  endtask

  task automatic load_patterns();
    for (int a = 0; a < NA; a++) load[a] = 1'b1;
    #20000;
    for (int a = 0; a < NA; a++) load[a] = 1'b0;
    #10000;
    mech[M_PAT_LOAD]++;
  endtask

  // Open the window of array a for ncyc of its clocks, check both counters.
  task automatic measure(input int a, input string name, input int ncyc,
                         input int exp0, input int exp1);
    real ber0, ber1;
    @(negedge vclk[a]) clr[a] = 1'b1;
    @(negedge vclk[a]) clr[a] = 1'b0;
    checks++;
    if (c0[a] !== '0 || c1[a] !== '0) failures++; else mech[M_CLEAR]++;
    repeat (4) @(negedge vclk[a]);
    win[a] = 1'b1;
    repeat (ncyc) @(negedge vclk[a]);
    win[a] = 1'b0;
    repeat (6) @(negedge vclk[a]);
    checks += 2;
    if (int'(c0[a]) < exp0 - 1 || int'(c0[a]) > exp0 + 1) begin
      failures++; $display("FAIL %s cnt0=%0d exp=%0d", name, c0[a], exp0);
    end
    if (int'(c1[a]) < exp1 - 1 || int'(c1[a]) > exp1 + 1) begin
      failures++; $display("FAIL %s cnt1=%0d exp=%0d", name, c1[a], exp1);
    end
    // BER = errors / (0.5 * clock cycles in the window)
    ber0 = real'(c0[a]) / (0.5 * ncyc);
    ber1 = real'(c1[a]) / (0.5 * ncyc);
    $display("%-28s array%0d cnt0=%4d cnt1=%4d  BER0=%.3f BER1=%.3f", name, a, c0[a], c1[a], ber0, ber1);
    if (c0[a] != 0) mech[M_ERR0]++;
    if (c1[a] != 0) mech[M_ERR1]++;
  endtask

  initial begin
    int edges;
    for (int a = 0; a < NA; a++) begin
      vco_en[a] = 1'b0; load[a] = 1'b0; win[a] = 1'b0; clr[a] = 1'b0; vdd[a] = 800;
      for (int p = 0; p < NP; p++) begin rise[a][p] = 40; fall[a][p] = 40; end
      acfg[a] = '{pat: '0, pol: 1'b0, stress: '0, meas: '0};
    end
    last_w = '0;
    #1;
    for (int a = 0; a < NA; a++) clr[a] = 1'b1;
    rise[0][3]  = 150;   // array 0, path 3: slow rising edges
    fall[1][10] = 150;   // array 1, path 10: slow falling edges
    rise[0][7]  = 60;    // array 0, path 7: fresh wire, degrades later
    #1000 rst_n = 1'b1;
    for (int a = 0; a < NA; a++) clr[a] = 1'b0;

    // time-zero measurement set-up
    acfg[0].pat = 32'h5555_5555; acfg[0].meas[3]  = 1'b1;
    acfg[1].pat = 32'h3333_3333; acfg[1].meas[10] = 1'b1;
    scan_all();
    for (int a = 0; a < NA; a++) vco_en[a] = 1'b1;
    #5000;
    load_patterns();
    measure(0, "a0 p3 slow rise, 0101", 800, 0, 200);
    measure(1, "a1 p10 slow fall, 0011", 800, 100, 0);
    // counter wrap-around: 1100 errors in a 10-bit counter
    measure(0, "a0 p3 long window", 4400, 0, 1100 % 1024);
    if (c1[0] < 200) mech[M_WRAP]++;
    // lower VCO supply: the clock period now exceeds the slow path's delay
    vdd[0] = 500;
    #5000;
    measure(0, "a0 p3 at 500 mV", 400, 0, 0);
    mech[M_FREQ]++;
    vdd[0] = 800;
    // fresh path 7 passes at 800 mV
    acfg[0].meas = '0; acfg[0].meas[7] = 1'b1;
    scan_all();
    measure(0, "a0 p7 before stress", 800, 0, 0);

    // stress phase: 8 datapaths of array 0, measurement circuits off
    for (int p = 0; p < 8; p++) acfg[0].stress[p] = 1'b1;
    acfg[0].meas = '0; acfg[1].meas = '0;
    for (int a = 0; a < NA; a++) vco_en[a] = 1'b0;
    scan_all();
    #10000;
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (p < 8 && path_out[0][p] !== 1'b1) begin failures++; $display("FAIL stress level p%0d", p); end
    end
    mech[M_STRESS_POL0]++;
    edges = 0;
    fork
      begin @(vclk[0] or vclk[1]); edges++; end
      #20000;
    join_any
    disable fork;
    checks++;
    if (edges != 0) failures++; else mech[M_VCO_OFF]++;
    // the wires' resistance rises under stress
    rise[0][7] = 150;
    // reverse polarity on the same paths
    acfg[0].pol = 1'b1;
    scan_all();
    #1000;
    for (int p = 0; p < 8; p++) begin
      checks++;
      if (path_out[0][p] !== 1'b0) begin failures++; $display("FAIL stress pol1 p%0d", p); end
    end
    mech[M_STRESS_POL1]++;
    // measuring a path while it is stressed reports nothing
    acfg[0].pol = 1'b0; acfg[0].meas[3] = 1'b1;
    scan_all();
    for (int a = 0; a < NA; a++) vco_en[a] = 1'b1;
    #5000;
    load_patterns();
    measure(0, "a0 p3 while stressed", 400, 0, 0);
    mech[M_STRESS_BLOCK]++;

    // stress off, re-measure the degraded path 7
    acfg[0].stress = '0; acfg[0].meas = '0; acfg[0].meas[7] = 1'b1;
    scan_all();
    #5000;
    measure(0, "a0 p7 after stress", 800, 0, 200);
    if (c1[0] > 100) mech[M_DEGRADE]++;

    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_e'(m));
      end else $display("mechanism %-16s x%0d", mech_e'(m), mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Assert the asynchronous reset/clear with an edge after time 0, so that
  // flip-flops starting at random values are cleared.
  initial begin
    #1;
    rst_n = 1'b0;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
