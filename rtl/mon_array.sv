// mon_array: one array of the monitor (the chip has a left and a right one).
//
// It holds N_PATHS DUT groups, the array's part of the control scan chain and
// the measurement circuit at the array top. The scan cells of the array are,
// from its scan input: the PAT_W pattern bits (cell 0 is pattern bit 0), the
// stress polarity, N_PATHS stress selects and N_PATHS measure enables. All
// groups share the VCO clock, the pattern bit and the sample strobe; the error
// strobes of all groups are OR-ed onto the two counter inputs, so only one
// datapath may have its measure enable set while the window is open (checked
// by an assertion). Array organisation, scan control, shared pattern and
// counters follow the chip; the scan bit order is this design's choice.
`timescale 1ps/1ps
module mon_array
  import em_ber_pkg::*;
#(
  parameter int unsigned N_PATHS    = N_PATHS_DEF,
  parameter int unsigned N_STAGES   = N_STAGES_DEF,
  parameter int unsigned PAT_W      = PAT_W_DEF,
  parameter int unsigned CNT_W      = CNT_W_DEF,
  parameter int unsigned VCO_STAGES = VCO_STAGES_DEF
) (
  input  logic             rst_n,
  input  logic             phi1,
  input  logic             phi2,
  input  logic             scan_in,
  output logic             scan_out,
  input  logic             vco_en_i,
  input  int unsigned      vco_vdd_mv_i,
  input  logic             pat_load_i,
  input  logic             win_en_i,
  input  logic             cnt_clr_i,
  input  int unsigned      rise_ps_i [N_PATHS],
  input  int unsigned      fall_ps_i [N_PATHS],
  output logic             vco_clk_o,
  output logic [CNT_W-1:0] cnt0_o,
  output logic [CNT_W-1:0] cnt1_o
);

  localparam int unsigned LEN = scan_len(N_PATHS, PAT_W);

  logic [LEN-1:0]     cfg;
  logic [PAT_W-1:0]   pat;
  logic               stress_pol;
  path_ctrl_t         ctrl [N_PATHS];
  err_pair_t          err  [N_PATHS];
  logic [N_PATHS-1:0] err0_v, err1_v, meas_v;
  logic               clk, data, sample;

  scan_chain #(.LEN(LEN)) u_scan (
    .rst_n    (rst_n),
    .phi1     (phi1),
    .phi2     (phi2),
    .scan_in  (scan_in),
    .scan_out (scan_out),
    .cfg_o    (cfg)
  );

  always_comb begin
    for (int b = 0; b < PAT_W; b++) pat[b] = cfg[pat_idx(b)];
    stress_pol = cfg[pol_idx(PAT_W)];
    for (int p = 0; p < N_PATHS; p++) begin
      ctrl[p].stress_sel = cfg[stress_idx(PAT_W, p)];
      ctrl[p].meas_en    = cfg[meas_idx(PAT_W, N_PATHS, p)];
      meas_v[p]          = ctrl[p].meas_en & ~ctrl[p].stress_sel;
      err0_v[p]          = err[p].err0;
      err1_v[p]          = err[p].err1;
    end
  end

  meas_circuit #(
    .PAT_W      (PAT_W),
    .CNT_W      (CNT_W),
    .VCO_STAGES (VCO_STAGES)
  ) u_meas (
    .rst_n        (rst_n),
    .vco_en_i     (vco_en_i),
    .vco_vdd_mv_i (vco_vdd_mv_i),
    .pat_load_i   (pat_load_i),
    .load_pat_i   (pat),
    .win_en_i     (win_en_i),
    .cnt_clr_i    (cnt_clr_i),
    .err0_i       (|err0_v),
    .err1_i       (|err1_v),
    .clk_o        (clk),
    .data_o       (data),
    .sample_o     (sample),
    .cnt0_o       (cnt0_o),
    .cnt1_o       (cnt1_o)
  );

  for (genvar p = 0; p < N_PATHS; p++) begin : g_grp
    dut_group #(.N_STAGES(N_STAGES)) u_grp (
      .clk          (clk),
      .rst_n        (rst_n),
      .data_i       (data),
      .sample_i     (sample),
      .ctrl_i       (ctrl[p]),
      .stress_pol_i (stress_pol),
      .rise_ps_i    (rise_ps_i[p]),
      .fall_ps_i    (fall_ps_i[p]),
      .err_o        (err[p])
    );
  end

  assign vco_clk_o = clk;

  // Only one datapath of the array may be measured at a time.
  a_one_meas: assert property (@(posedge clk) disable iff (!rst_n)
                               win_en_i |-> $onehot0(meas_v))
    else $error("mon_array: more than one datapath selected while measuring");

endmodule
