// em_ber_monitor: top of the all-digital electromigration bit-error-rate
// monitor.
//
// N_ARRAYS arrays (left and right on the chip) of N_PATHS datapaths each run
// under interconnect heaters. One scan chain runs through all arrays (array 0
// first) and holds, per array, the 32-bit pattern, the stress polarity and a
// stress select and measure enable per datapath. Each array has its own VCO,
// pattern generator and pair of 10-bit error counters; its VCO supply, VCO
// enable, pattern load, error window and counter clear are pins. The per-path
// rise_ps/fall_ps inputs are not chip pins: they set the stage delays of the
// behavioural wire models and stand for the wires' electromigration-induced
// resistance. The heaters are passive resistors driven from bare pads and are
// not part of this netlist. Array count, path count and control scheme follow
// the chip; sharing one scan chain and giving each array its own window and
// VCO pins are this design's choices.
`timescale 1ps/1ps
module em_ber_monitor
  import em_ber_pkg::*;
#(
  parameter int unsigned N_ARRAYS   = N_ARRAYS_DEF,
  parameter int unsigned N_PATHS    = N_PATHS_DEF,
  parameter int unsigned N_STAGES   = N_STAGES_DEF,
  parameter int unsigned PAT_W      = PAT_W_DEF,
  parameter int unsigned CNT_W      = CNT_W_DEF,
  parameter int unsigned VCO_STAGES = VCO_STAGES_DEF
) (
  input  logic             rst_n,
  input  logic             scan_phi1,
  input  logic             scan_phi2,
  input  logic             scan_in,
  output logic             scan_out,
  input  logic             vco_en     [N_ARRAYS],
  input  int unsigned      vco_vdd_mv [N_ARRAYS],
  input  logic             pat_load   [N_ARRAYS],
  input  logic             win_en     [N_ARRAYS],
  input  logic             cnt_clr    [N_ARRAYS],
  input  int unsigned      rise_ps    [N_ARRAYS][N_PATHS],
  input  int unsigned      fall_ps    [N_ARRAYS][N_PATHS],
  output logic             vco_clk    [N_ARRAYS],
  output logic [CNT_W-1:0] err0_cnt   [N_ARRAYS],
  output logic [CNT_W-1:0] err1_cnt   [N_ARRAYS]
);

  logic chain [N_ARRAYS+1];

  assign chain[0] = scan_in;

  for (genvar a = 0; a < N_ARRAYS; a++) begin : g_arr
    mon_array #(
      .N_PATHS    (N_PATHS),
      .N_STAGES   (N_STAGES),
      .PAT_W      (PAT_W),
      .CNT_W      (CNT_W),
      .VCO_STAGES (VCO_STAGES)
    ) u_arr (
      .rst_n        (rst_n),
      .phi1         (scan_phi1),
      .phi2         (scan_phi2),
      .scan_in      (chain[a]),
      .scan_out     (chain[a+1]),
      .vco_en_i     (vco_en[a]),
      .vco_vdd_mv_i (vco_vdd_mv[a]),
      .pat_load_i   (pat_load[a]),
      .win_en_i     (win_en[a]),
      .cnt_clr_i    (cnt_clr[a]),
      .rise_ps_i    (rise_ps[a]),
      .fall_ps_i    (fall_ps[a]),
      .vco_clk_o    (vco_clk[a]),
      .cnt0_o       (err0_cnt[a]),
      .cnt1_o       (err1_cnt[a])
    );
  end

  assign scan_out = chain[N_ARRAYS];

endmodule
