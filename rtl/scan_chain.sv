// scan_chain: control scan chain built from D flip-flops with staggered
// two-phase clocking.
//
// Each scan cell is a pair of flip-flops: a master clocked by PHI1 that takes
// the previous cell's output (or scan_in), and a slave clocked by PHI2 that
// takes its own master. One PHI1 pulse followed by one PHI2 pulse shifts the
// chain by one cell. Because the two phases never overlap, no cell can take a
// value its neighbour changed in the same phase, so the shift has no hold-time
// race however slow or skewed the devices get at stress temperature.
// Cell 0 is next to scan_in; cfg_o[i] is the slave of cell i; scan_out is the
// slave of the last cell. The cells are not shadowed, so control outputs follow
// the shift. Using two phases follows the chip; the master/slave pairing, the
// asynchronous clear (rst_n) and the absence of shadow latches are this
// design's choices.
`timescale 1ps/1ps
module scan_chain #(
  parameter int unsigned LEN = 129
) (
  input  logic           rst_n,
  input  logic           phi1,
  input  logic           phi2,
  input  logic           scan_in,
  output logic           scan_out,
  output logic [LEN-1:0] cfg_o
);

  logic [LEN-1:0] mst;
  logic [LEN-1:0] slv;
  logic [LEN-1:0] mst_d;

  assign mst_d = {slv[LEN-2:0], scan_in};

  always_ff @(posedge phi1 or negedge rst_n) begin
    if (!rst_n) mst <= '0;
    else        mst <= mst_d;
  end

  always_ff @(posedge phi2 or negedge rst_n) begin
    if (!rst_n) slv <= '0;
    else        slv <= mst;
  end

  assign cfg_o    = slv;
  assign scan_out = slv[LEN-1];

  // The two phases must never be high together.
  always_comb begin
    assert (!(phi1 && phi2)) else $error("scan_chain: phi1 and phi2 overlap");
  end

endmodule
