// tb_pattern_gen: self-checking test of the circular pattern generator.
// Loads several patterns, then compares data_o and sample_o in every clock with
// a reference computed from the loaded word: bit PAT_W-1 first, one bit per two
// clocks, rotating, and sample_o high in the first clock of each bit.
`timescale 1ps/1ps
module tb_pattern_gen;
  localparam int unsigned PAT_W = 32;
  logic clk = 1'b0, rst_n = 1'b1, load = 1'b0, data, sample;
  logic [PAT_W-1:0] pat;
  int checks = 0, failures = 0;

  pattern_gen #(.PAT_W(PAT_W)) dut (
    .clk(clk), .rst_n(rst_n), .load_i(load), .load_pat_i(pat),
    .data_o(data), .sample_o(sample));

  always #250 clk = ~clk;

  task automatic run_pattern(input logic [PAT_W-1:0] p, input int ncyc);
    int exp_idx;
    pat = p;
    @(negedge clk) load = 1'b1;
    @(negedge clk) load = 1'b0;   // one load edge has passed: cycle j = 0
    for (int j = 0; j < ncyc; j++) begin
      exp_idx = PAT_W - 1 - ((j / 2) % PAT_W);
      checks++;
      if (data !== p[exp_idx] || sample !== (j % 2 == 0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL pat=%h j=%0d data=%b exp=%b sample=%b", p, j, data, p[exp_idx], sample);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    pat = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_pattern(32'h5555_5555, 140);
    run_pattern(32'h3333_3333, 140);
    run_pattern(32'hA5C3_1F0E, 200);
    run_pattern($urandom, 200);
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
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
