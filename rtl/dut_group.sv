// dut_group: unit tileable DUT group for one datapath.
//
// The pattern bit data_i drives both the reference path (one buffer) and the
// DUT path (N_STAGES buffer/interconnect stages). A ber_sampler captures both
// outputs on the rising edge after each launched bit and raises err1 (REF.DUT')
// or err0 (REF'.DUT) for one clock when they differ. The control bits from the
// scan chain decide the mode: stress_sel turns the DUT path's functional
// drivers off and its stress drivers on, with the array's stress polarity;
// meas_en selects the datapath for measurement. A stressed datapath never
// reports errors. This follows the chip's group organisation; the rule that
// stress blocks measurement is this design's choice.
`timescale 1ps/1ps
module dut_group
  import em_ber_pkg::*;
#(
  parameter int unsigned N_STAGES     = N_STAGES_DEF,
  parameter int unsigned REF_DELAY_PS = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        data_i,
  input  logic        sample_i,
  input  path_ctrl_t  ctrl_i,
  input  logic        stress_pol_i,
  input  int unsigned rise_ps_i,
  input  int unsigned fall_ps_i,
  output err_pair_t   err_o
);

  logic ref_out, dut_out;
  logic drv_en, stress_en, meas_en;

  always_comb begin
    stress_en = ctrl_i.stress_sel;
    drv_en    = ~ctrl_i.stress_sel;
    meas_en   = ctrl_i.meas_en & ~ctrl_i.stress_sel;
  end

  ref_buffer #(.DELAY_PS(REF_DELAY_PS)) u_ref (
    .a_i (data_i),
    .y_o (ref_out)
  );

  ic_datapath #(.N_STAGES(N_STAGES)) u_path (
    .data_i       (data_i),
    .drv_en_i     (drv_en),
    .stress_en_i  (stress_en),
    .stress_pol_i (stress_pol_i),
    .rise_ps_i    (rise_ps_i),
    .fall_ps_i    (fall_ps_i),
    .data_o       (dut_out)
  );

  ber_sampler u_smp (
    .clk       (clk),
    .rst_n     (rst_n),
    .sample_i  (sample_i),
    .meas_en_i (meas_en),
    .ref_i     (ref_out),
    .dut_i     (dut_out),
    .err_o     (err_o)
  );

endmodule
