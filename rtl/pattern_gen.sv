// pattern_gen: bit-pattern generator, a circular shift register with parallel
// load from the scan chain.
//
// While load_i is high the register takes load_pat_i (bit PAT_W-1 is sent
// first). Otherwise it rotates left by one position every second clock, so
// one data bit lasts two clock periods and the data rate is half the clock
// rate. data_o is the register's top bit, straight from a flip-flop. sample_o
// is high during the first clock period of each bit: the rising edge that ends
// that period is the "next rising edge" at which the datapath outputs are
// sampled. The register width and the scan load follow the chip; the
// synchronous load, the reset and the sample strobe are this design's choices.
`timescale 1ps/1ps
module pattern_gen #(
  parameter int unsigned PAT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load_i,
  input  logic [PAT_W-1:0] load_pat_i,
  output logic             data_o,
  output logic             sample_o
);

  logic [PAT_W-1:0] sr;
  logic             ph;   // 0: first clock of a bit, 1: second clock

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0;
      ph <= 1'b0;
    end else if (load_i) begin
      sr <= load_pat_i;
      ph <= 1'b0;
    end else begin
      ph <= ~ph;
      if (ph) sr <= {sr[PAT_W-2:0], sr[PAT_W-1]};
    end
  end

  assign data_o   = sr[PAT_W-1];
  assign sample_o = ~ph;

endmodule
