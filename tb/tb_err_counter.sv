// tb_err_counter: self-checking test of the 10-bit ripple error counter.
// Random increment strobes are counted by a reference integer modulo 2**CNT_W;
// the counter is compared after every clock, through more than one wrap-around,
// and after asynchronous clears.
`timescale 1ps/1ps
module tb_err_counter;
  localparam int unsigned CNT_W = 10;
  logic clk = 1'b0, clr = 1'b0, inc = 1'b0;
  logic [CNT_W-1:0] cnt;
  int unsigned ref_cnt = 0;
  int checks = 0, failures = 0, wraps = 0;

  err_counter #(.CNT_W(CNT_W)) dut (.clk(clk), .clr_i(clr), .inc_i(inc), .cnt_o(cnt));

  always #250 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    clr = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (cnt !== CNT_W'(ref_cnt)) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d cnt=%0d exp=%0d", i, cnt, ref_cnt % 1024);
      end
      inc = ($urandom_range(0, 3) != 0);
      if (i == 1500) begin
        clr = 1'b1;
        #10 clr = 1'b0;
        ref_cnt = 0;
        checks++;
        if (cnt !== '0) failures++;
      end
      if (inc) begin
        ref_cnt = (ref_cnt + 1) % (1 << CNT_W);
        if (ref_cnt == 0) wraps++;
      end
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL counter never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Assert the asynchronous reset/clear with an edge after time 0, so that
  // flip-flops starting at random values are cleared.
  initial begin
    #1;
    clr = 1'b1;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
