// ic_datapath: behavioural model (not synthesizable logic) of one DUT datapath:
// N_STAGES identical stages, each a tri-state buffer driving a minimum-width M3
// interconnect (with its feeders), plus the tri-state stress drivers at both
// ends of every wire.
//
// Measurement mode (drv_en_i high, stress_en_i low): node k follows node k-1
// after rise_ps_i for a rising edge and fall_ps_i for a falling edge; these
// are the delays of one stage (buffer plus wire) and stand for the wire's
// resistance, so raising them models an electromigration resistance shift.
// Separate rise and fall delays model the distinct pull-up and pull-down paths
// of the buffers, which make the data '0' and data '1' error rates differ.
// Stress mode (stress_en_i high): the functional buffers are off and the stress
// drivers hold a DC current through every wire. With stress_pol_i = 0 the
// receiver end of each wire is driven high and the driver end low (current from
// the receiver end to the driver end, as in the stress experiment); with
// stress_pol_i = 1 the opposite. data_o then shows the receiver-end level.
// With neither enabled the wires float and the model holds the last level;
// that hold is why synthesis infers latches for the wire nodes. They model
// wire charge, not logic, and stand.
// The stage count, the tri-state buffers and the two-ended stress drivers
// follow the chip; the delay parameters are the model's interface.
`timescale 1ps/1ps
module ic_datapath #(
  parameter int unsigned N_STAGES = 5
) (
  input  logic        data_i,
  input  logic        drv_en_i,
  input  logic        stress_en_i,
  input  logic        stress_pol_i,
  input  int unsigned rise_ps_i,
  input  int unsigned fall_ps_i,
  output logic        data_o
);

  // d[k]: level at the receiver end of wire k as driven by the functional
  // buffers. In stress mode the stress drivers override every wire, which the
  // output mux models; edges still in flight in d[] are then never seen.
  logic d [N_STAGES+1];

  initial begin
    for (int k = 1; k <= N_STAGES; k++) d[k] = 1'b0;
  end

  always_comb d[0] = data_i;

  for (genvar k = 1; k <= N_STAGES; k++) begin : g_stage
    always @(d[k-1] or drv_en_i) begin
      if (drv_en_i) d[k] <= #(d[k-1] ? rise_ps_i : fall_ps_i) d[k-1];
    end
  end

  assign data_o = stress_en_i ? ~stress_pol_i : d[N_STAGES];

endmodule
