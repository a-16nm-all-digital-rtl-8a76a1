// ber_sampler: local bit-error sampler of one datapath.
//
// On the rising clock edge that follows each launched bit (sample_i high in
// the clock period before it) the reference path output ref_i and the DUT
// path output dut_i are captured as REF and DUT. During the next clock period
// the two error strobes are formed: err1 = REF.DUT' (a '1' that arrived as
// '0') and err0 = REF'.DUT (a '0' that arrived as '1'), both gated by meas_en_i
// so that only the selected datapath reaches the counters. Each strobe is high
// for at most one clock per bit. The sampling edge and the two logic
// functions follow the chip; the one-clock strobe and the reset are this
// design's choices.
`timescale 1ps/1ps
module ber_sampler
  import em_ber_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      sample_i,
  input  logic      meas_en_i,
  input  logic      ref_i,
  input  logic      dut_i,
  output err_pair_t err_o
);

  logic ref_q, dut_q, vld_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q <= 1'b0;
      dut_q <= 1'b0;
      vld_q <= 1'b0;
    end else begin
      vld_q <= sample_i;
      if (sample_i) begin
        ref_q <= ref_i;
        dut_q <= dut_i;
      end
    end
  end

  always_comb begin
    err_o.err1 = meas_en_i & vld_q &  ref_q & ~dut_q;
    err_o.err0 = meas_en_i & vld_q & ~ref_q &  dut_q;
  end

endmodule
