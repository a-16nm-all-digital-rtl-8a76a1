// tb_ber_workloads: the chip's three measurement workloads, run on the full
// default-size monitor.
//
//  1. BER against clock frequency: the VCO supply is swept and a path of known
//     delay is measured at each step. The count must be zero while the clock
//     period exceeds the path delay and one error per transition once it does
//     not; a path with unequal rise and fall delays must fail for data '1'
//     at a lower frequency than for data '0'.
//  2. Pattern check: on a slow path the saturated BER must equal the share of
//     bits that are transitions: 1 (0101), 1/2 (0011), 1/4 (00001111),
//     1/8 (0000000011111111).
//  3. Stress cycles: eight paths of array 0 are stressed in parallel (VCOs
//     off); between cycles their stage delays grow (abrupt steps or
//     progressive drift, standing for EM resistance shifts), and four of them
//     are re-characterised by finding the highest VCO supply at which they
//     stay error-free. That operating point must match the one predicted from
//     the delay, and must never rise.
// Expected values use the VCO period law 2*7*floor(19841/(Vdd-300)) ps and the
// rule that a bit fails when its path delay exceeds one clock period. Periods
// are multiples of 14 ps; the delays used avoid them, so no edge ties a clock.
`timescale 1ps/1ps
module tb_ber_workloads;
  import em_ber_pkg::*;
  localparam int unsigned NA = N_ARRAYS_DEF, NP = N_PATHS_DEF, PW = PAT_W_DEF, CW = CNT_W_DEF;
  localparam int unsigned LEN = scan_len(NP, PW);
  localparam int unsigned TOT = NA * LEN;
  localparam int NCYC = 400;

  logic rst_n = 1'b1, phi1 = 1'b0, phi2 = 1'b0, si = 1'b0, so;
  logic vco_en [NA], load [NA], win [NA], clr [NA];
  int unsigned vdd [NA];
  int unsigned rise [NA][NP];
  int unsigned fall [NA][NP];
  logic vclk [NA];
  logic [CW-1:0] c0 [NA];
  logic [CW-1:0] c1 [NA];
  int checks = 0, failures = 0;

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

  function automatic int period_ps(input int v);
    return 2 * 7 * (19841 / (v - 300));
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic scan_all();
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
    for (int i = TOT - 1; i >= 0; i--) begin
      si = w[i];
      #100 phi1 = 1'b1; #100 phi1 = 1'b0;
      #100 phi2 = 1'b1; #100 phi2 = 1'b0;
    end
  endtask

  task automatic select(input int p, input logic [PW-1:0] pat);
    acfg[0].meas = '0;
    acfg[0].meas[p] = 1'b1;
    acfg[0].pat = pat;
    scan_all();
    load[0] = 1'b1;
    repeat (4) @(negedge vclk[0]);
    load[0] = 1'b0;
    repeat (4) @(negedge vclk[0]);
  endtask

  task automatic set_vdd(input int v);
    vdd[0] = v;
    repeat (4) @(negedge vclk[0]);
  endtask

  // One error window on array 0; returns both counts.
  task automatic window(output int n0, output int n1);
    @(negedge vclk[0]) clr[0] = 1'b1;
    @(negedge vclk[0]) clr[0] = 1'b0;
    repeat (4) @(negedge vclk[0]);
    win[0] = 1'b1;
    repeat (NCYC) @(negedge vclk[0]);
    win[0] = 1'b0;
    repeat (6) @(negedge vclk[0]);
    n0 = int'(c0[0]);
    n1 = int'(c1[0]);
  endtask

  function automatic bit near(input int got, input int exp);
    return got >= exp - 1 && got <= exp + 1;
  endfunction

  // Highest supply in the sweep at which path p is error-free.
  task automatic op_point(input int p, output int v_ok);
    int n0, n1;
    v_ok = 0;
    for (int v = 500; v <= 1200; v += 25) begin
      set_vdd(v);
      window(n0, n1);
      if (n0 + n1 != 0) break;
      v_ok = v;
    end
  endtask

  function automatic int predicted_op(input int delay_ps);
    int v_ok;
    v_ok = 0;
    for (int v = 500; v <= 1200; v += 25) begin
      if (period_ps(v) <= delay_ps) break;
      v_ok = v;
    end
    return v_ok;
  endfunction

  initial begin
    int n0, n1, bits, v_ok, v_pred;
    int last_op [4];
    int stage [4];
    logic [PW-1:0] pats [4];
    int trans_div [4];
    int v1_fail, v0_fail;

    for (int a = 0; a < NA; a++) begin
      vco_en[a] = 1'b0; load[a] = 1'b0; win[a] = 1'b0; clr[a] = 1'b0; vdd[a] = 800;
      for (int p = 0; p < NP; p++) begin rise[a][p] = 40; fall[a][p] = 40; end
      acfg[a] = '{pat: '0, pol: 1'b0, stress: '0, meas: '0};
    end
    #1 rst_n = 1'b0;
    for (int a = 0; a < NA; a++) clr[a] = 1'b1;
    #1000 rst_n = 1'b1;
    for (int a = 0; a < NA; a++) clr[a] = 1'b0;
    bits = NCYC / 2;

    // ---- 1. BER against frequency --------------------------------------
    rise[0][20] = 100; fall[0][20] = 100;   // 500 ps path
    rise[0][21] = 100; fall[0][21] = 80;    // '1' slower than '0'
    for (int a = 0; a < NA; a++) vco_en[a] = 1'b1;
    #5000;
    select(20, 32'h5555_5555);
    for (int v = 600; v <= 1000; v += 50) begin
      int exp;
      set_vdd(v);
      window(n0, n1);
      exp = (period_ps(v) < 500) ? bits / 2 : 0;
      check(near(n0, exp) && near(n1, exp), $sformatf("sweep %0d mV: cnt0=%0d cnt1=%0d exp=%0d", v, n0, n1, exp));
      $display("sweep path20 vdd=%4d mV f=%4d MHz BER=%.3f", v, 1_000_000 / period_ps(v),
               real'(n0 + n1) / real'(bits));
    end
    select(21, 32'h5555_5555);
    v1_fail = 0; v0_fail = 0;
    for (int v = 600; v <= 1200; v += 25) begin
      set_vdd(v);
      window(n0, n1);
      if (n1 != 0 && v1_fail == 0) v1_fail = v;
      if (n0 != 0 && v0_fail == 0) v0_fail = v;
    end
    $display("path21: data '1' fails from %0d mV, data '0' from %0d mV", v1_fail, v0_fail);
    check(v1_fail == predicted_op(500) + 25 && v0_fail == predicted_op(400) + 25,
          "rise/fall separation of path 21");

    // ---- 2. pattern check -------------------------------------------------
    pats[0] = 32'h5555_5555; trans_div[0] = 1;
    pats[1] = 32'h3333_3333; trans_div[1] = 2;
    pats[2] = 32'h0F0F_0F0F; trans_div[2] = 4;
    pats[3] = 32'h00FF_00FF; trans_div[3] = 8;
    rise[0][20] = 150; fall[0][20] = 150;   // 750 ps: between one and two periods at 800 mV
    for (int k = 0; k < 4; k++) begin
      select(20, pats[k]);
      set_vdd(800);
      window(n0, n1);
      check(n0 + n1 >= bits / trans_div[k] - 2 && n0 + n1 <= bits / trans_div[k] + 2,
            $sformatf("pattern %h: errors=%0d exp=%0d", pats[k], n0 + n1, bits / trans_div[k]));
      $display("pattern %h saturated BER=%.3f", pats[k], real'(n0 + n1) / real'(bits));
    end

    // ---- 3. stress cycles -------------------------------------------------
    for (int p = 0; p < 4; p++) begin
      stage[p] = 60;
      rise[0][p] = 60; fall[0][p] = 60;
      last_op[p] = 10000;
    end
    for (int cyc = 0; cyc < 5; cyc++) begin
      if (cyc > 0) begin
        // stress phase
        acfg[0].meas = '0;
        for (int p = 0; p < 8; p++) acfg[0].stress[p] = 1'b1;
        vco_en[0] = 1'b0;
        scan_all();
        #10000;
        // resistance shifts during this cycle
        stage[0] += 9;                          // slow progressive
        if (cyc == 2) stage[1] += 40;           // one abrupt step
        if (cyc >= 3) stage[2] += 15;           // late onset, then drift
        stage[3] += (cyc == 1) ? 35 : 5;        // fast abrupt, then drift
        for (int p = 0; p < 4; p++) begin rise[0][p] = stage[p]; fall[0][p] = stage[p]; end
        acfg[0].stress = '0;
        scan_all();
        vco_en[0] = 1'b1;
        #5000;
      end
      for (int p = 0; p < 4; p++) begin
        select(p, 32'h5555_5555);
        op_point(p, v_ok);
        v_pred = predicted_op(5 * stage[p]);
        check(v_ok == v_pred, $sformatf("cycle %0d path %0d op=%0d pred=%0d", cyc, p, v_ok, v_pred));
        check(v_ok <= last_op[p], $sformatf("cycle %0d path %0d operating point rose", cyc, p));
        $display("stress cycle %0d path %0d: delay %0d ps, error-free up to %0d mV (%0d MHz)",
                 cyc, p, 5 * stage[p], v_ok, v_ok ? 1_000_000 / period_ps(v_ok) : 0);
        last_op[p] = v_ok;
      end
    end
    check(last_op[3] < predicted_op(300), "degradation visible");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #900_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
