// tb_dut_group: self-checking test of one DUT group. The testbench plays the
// pattern generator (alternating bits, one bit per two clocks, sample strobe
// in the first clock of a bit) and sets the stage delays. Expected error
// counts come from the timing alone: a bit whose edge needs more than one clock
// period through the five stages is received wrong at the sampling edge.
`timescale 1ps/1ps
module tb_dut_group;
  import em_ber_pkg::*;
  localparam int unsigned T = 550;
  logic clk = 1'b0, rst_n = 1'b1, data = 1'b0, ph = 1'b0;
  logic sample;
  path_ctrl_t ctrl;
  logic pol = 1'b0;
  int unsigned rise = 40, fall = 40;
  err_pair_t err;
  int checks = 0, failures = 0;
  int n0 = 0, n1 = 0, ones = 0, zeros = 0;

  dut_group #(.N_STAGES(5)) dut (.clk(clk), .rst_n(rst_n), .data_i(data), .sample_i(sample),
    .ctrl_i(ctrl), .stress_pol_i(pol), .rise_ps_i(rise), .fall_ps_i(fall), .err_o(err));

  always #(T/2) clk = ~clk;

  // Alternating pattern at half the clock rate.
  always @(posedge clk) begin
    ph <= ~ph;
    if (ph) data <= ~data;
  end
  assign sample = ~ph;

  always @(posedge clk) begin
    n0 += int'(err.err0);
    n1 += int'(err.err1);
    if (sample) begin
      ones  += int'(data);
      zeros += int'(!data);
    end
  end

  task automatic run_case(input string name, input int exp0, input int exp1);
    n0 = 0; n1 = 0; ones = 0; zeros = 0;
    repeat (400) @(posedge clk);
    checks += 2;
    if (exp0 >= 0 ? (n0 < exp0 - 1 || n0 > exp0 + 1) : (n0 < zeros - 1 || n0 > zeros + 1)) begin
      failures++; $display("FAIL %s err0=%0d", name, n0);
    end
    if (exp1 >= 0 ? (n1 < exp1 - 1 || n1 > exp1 + 1) : (n1 < ones - 1 || n1 > ones + 1)) begin
      failures++; $display("FAIL %s err1=%0d", name, n1);
    end
    $display("%s: err0=%0d err1=%0d ones=%0d zeros=%0d", name, n0, n1, ones, zeros);
  endtask

  initial begin
    ctrl = '{meas_en: 1'b1, stress_sel: 1'b0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    // exp = -1 means: one error per bit of that value
    run_case("fast path", 0, 0);
    rise = 150; repeat (10) @(negedge clk);
    run_case("slow rise", 0, -1);
    rise = 40; fall = 150; repeat (10) @(negedge clk);
    run_case("slow fall", -1, 0);
    fall = 150; rise = 150; ctrl.meas_en = 1'b0; repeat (10) @(negedge clk);
    run_case("not selected", 0, 0);
    ctrl = '{meas_en: 1'b1, stress_sel: 1'b1}; repeat (10) @(negedge clk);
    run_case("stressed", 0, 0);
    checks++;
    if (dut.dut_out !== 1'b1) begin failures++; $display("FAIL stress level"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Assert the asynchronous reset/clear with an edge after time 0, so that
  // flip-flops starting at random values are cleared.
  initial begin
    #1;
    rst_n = 1'b0;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
