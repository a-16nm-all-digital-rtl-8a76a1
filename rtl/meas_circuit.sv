// meas_circuit: measurement circuit at the top of one array.
//
// It holds the ring VCO that clocks the array, the circular pattern generator
// that feeds every datapath of the array, and two asynchronous error counters,
// one for data '0' errors and one for data '1' errors of the selected
// datapath. The error window (win_en_i) and the pattern load strobe
// (pat_load_i) come from the bench asynchronously and are each brought into the
// VCO clock domain by two flip-flops; an error strobe is counted only while the
// synchronised window is open. cnt_clr_i clears both counters asynchronously.
// Counts are read on cnt0_o/cnt1_o after the window closes. The VCO is stopped
// with vco_en_i low (the chip powers its measurement circuits down during
// stress). The three parts follow the chip; the synchronisers are this design's
// choice.
`timescale 1ps/1ps
module meas_circuit
  import em_ber_pkg::*;
#(
  parameter int unsigned PAT_W      = PAT_W_DEF,
  parameter int unsigned CNT_W      = CNT_W_DEF,
  parameter int unsigned VCO_STAGES = VCO_STAGES_DEF
) (
  input  logic             rst_n,
  input  logic             vco_en_i,
  input  int unsigned      vco_vdd_mv_i,
  input  logic             pat_load_i,
  input  logic [PAT_W-1:0] load_pat_i,
  input  logic             win_en_i,
  input  logic             cnt_clr_i,
  input  logic             err0_i,
  input  logic             err1_i,
  output logic             clk_o,
  output logic             data_o,
  output logic             sample_o,
  output logic [CNT_W-1:0] cnt0_o,
  output logic [CNT_W-1:0] cnt1_o
);

  logic       clk;
  logic [1:0] win_sync, load_sync;

  ring_vco #(.STAGES(VCO_STAGES)) u_vco (
    .en_i     (vco_en_i),
    .vdd_mv_i (vco_vdd_mv_i),
    .clk_o    (clk)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_sync  <= '0;
      load_sync <= '0;
    end else begin
      win_sync  <= {win_sync[0], win_en_i};
      load_sync <= {load_sync[0], pat_load_i};
    end
  end

  pattern_gen #(.PAT_W(PAT_W)) u_pat (
    .clk        (clk),
    .rst_n      (rst_n),
    .load_i     (load_sync[1]),
    .load_pat_i (load_pat_i),
    .data_o     (data_o),
    .sample_o   (sample_o)
  );

  err_counter #(.CNT_W(CNT_W)) u_cnt0 (
    .clk   (clk),
    .clr_i (cnt_clr_i),
    .inc_i (err0_i & win_sync[1]),
    .cnt_o (cnt0_o)
  );

  err_counter #(.CNT_W(CNT_W)) u_cnt1 (
    .clk   (clk),
    .clr_i (cnt_clr_i),
    .inc_i (err1_i & win_sync[1]),
    .cnt_o (cnt1_o)
  );

  assign clk_o = clk;

endmodule
