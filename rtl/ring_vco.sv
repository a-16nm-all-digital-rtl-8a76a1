// ring_vco: behavioural model (not synthesizable logic) of the supply-tuned
// ring voltage-controlled oscillator that clocks the measurement circuit.
//
// STAGES inverting stages form a ring; stage 0 is a NAND with the enable, so
// with en_i low the ring rests at 1,0,1,...,1 and clk_o stays high. With en_i
// high each stage switches one stage delay after its input, giving a period of
// 2*STAGES stage delays. The stage delay falls with the ring supply:
//   t_stage [ps] = K_PS_MV / (vdd_mv_i - VTH_MV)
// and the ring stops when vdd_mv_i <= VTH_MV. With the defaults, 800 mV gives
// about 39 ps per stage and a 1.83 GHz clock, close to the 1.8 GHz at which
// the chip's datapaths were measured. Seven stages and supply tuning follow the
// chip; the single-ended ring (the chip's is cross-coupled) and the delay law
// are this model's assumptions. clk_o is the last stage. An oscillator is a
// closed combinational loop by nature, so synthesis reports a logic loop here;
// it is intended and stands.
`timescale 1ps/1ps
module ring_vco #(
  parameter int unsigned STAGES  = 7,
  parameter int unsigned VTH_MV  = 300,
  parameter int unsigned K_PS_MV = 19841
) (
  input  logic        en_i,
  input  int unsigned vdd_mv_i,
  output logic        clk_o
);

  logic        n [STAGES];
  logic        run;
  int unsigned t_stage;

  always_comb begin
    run     = en_i && (vdd_mv_i > VTH_MV);
    t_stage = run ? K_PS_MV / (vdd_mv_i - VTH_MV) : 1;
    if (t_stage == 0) t_stage = 1;
  end

  initial begin
    for (int k = 0; k < STAGES; k++) n[k] = (k % 2 == 0);
  end

  always @(n[STAGES-1] or run) n[0] <= #(t_stage) ~(n[STAGES-1] & run);

  for (genvar k = 1; k < STAGES; k++) begin : g_stage
    always @(n[k-1]) n[k] <= #(t_stage) ~n[k-1];
  end

  assign clk_o = n[STAGES-1];

endmodule
