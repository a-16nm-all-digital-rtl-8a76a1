// ref_buffer: behavioural model (not synthesizable logic) of the reference
// datapath, a single signal buffer driven by the same pattern as the DUT path.
// Its output y_o follows a_i after DELAY_PS; it has no long interconnect, so
// it stays well inside one clock period at any VCO frequency and gives the
// error-free REF copy of each bit. The buffer follows the chip; its delay
// value is this model's assumption.
`timescale 1ps/1ps
module ref_buffer #(
  parameter int unsigned DELAY_PS = 20
) (
  input  logic a_i,
  output logic y_o
);

  initial y_o = 1'b0;

  always @(a_i) y_o <= #(DELAY_PS) a_i;

endmodule
