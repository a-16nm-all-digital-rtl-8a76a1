// err_counter: asynchronous (ripple) error counter.
//
// Bit 0 is a toggle flip-flop clocked by the measurement clock that toggles
// in every clock where inc_i is high, so each sampled error is counted once.
// Every further bit toggles on the falling edge of the bit below it, so the
// count ripples up without a carry chain; the value is read once the error
// window has closed and the ripple has settled. clr_i clears all bits
// asynchronously. The count wraps from 2**CNT_W-1 to 0. The width and the
// ripple structure follow the chip; the synchronous first stage, the clear
// and the wrap-around are this design's choices.
`timescale 1ps/1ps
module err_counter #(
  parameter int unsigned CNT_W = 10
) (
  input  logic             clk,
  input  logic             clr_i,
  input  logic             inc_i,
  output logic [CNT_W-1:0] cnt_o
);

  for (genvar k = 0; k < CNT_W; k++) begin : g_bit
    logic q;
    if (k == 0) begin : g_first
      always_ff @(posedge clk or posedge clr_i) begin
        if (clr_i)      q <= 1'b0;
        else if (inc_i) q <= ~q;
      end
    end else begin : g_ripple
      always_ff @(negedge g_bit[k-1].q or posedge clr_i) begin
        if (clr_i) q <= 1'b0;
        else       q <= ~q;
      end
    end
    assign cnt_o[k] = q;
  end

endmodule
