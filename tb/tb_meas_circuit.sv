// tb_meas_circuit: self-checking test of the measurement circuit. It checks
// the VCO period, that the loaded pattern comes out bit by bit at the sample
// strobes, that error strobes are counted only inside the (two-flop
// synchronised) window in the right counter, the counter clear, and that the
// clock stops when the VCO is disabled.
`timescale 1ps/1ps
module tb_meas_circuit;
  localparam int unsigned PAT_W = 32, CNT_W = 10;
  logic rst_n = 1'b1, vco_en = 1'b0, load = 1'b0, win = 1'b0, clr = 1'b0;
  logic e0 = 1'b0, e1 = 1'b0;
  int unsigned vdd = 800;
  logic [PAT_W-1:0] pat = 32'h0F0F_3C5A;
  logic clk, data, sample;
  logic [CNT_W-1:0] c0, c1;
  logic [1:0] wd = '0;
  int checks = 0, failures = 0, exp0 = 0, exp1 = 0;

  meas_circuit #(.PAT_W(PAT_W), .CNT_W(CNT_W), .VCO_STAGES(7)) dut (
    .rst_n(rst_n), .vco_en_i(vco_en), .vco_vdd_mv_i(vdd), .pat_load_i(load),
    .load_pat_i(pat), .win_en_i(win), .cnt_clr_i(clr), .err0_i(e0), .err1_i(e1),
    .clk_o(clk), .data_o(data), .sample_o(sample), .cnt0_o(c0), .cnt1_o(c1));

  // reference: window delayed by two clocks, count strobes while it is high
  always @(posedge clk) begin
    if (wd[1]) begin
      exp0 += int'(e0);
      exp1 += int'(e1);
    end
    wd <= {wd[0], win};
  end

  always @(negedge clk) begin
    e0 <= ($urandom_range(0, 3) == 0);
    e1 <= ($urandom_range(0, 1) == 0);
  end

  initial begin
    time t0, t1;
    int k;
    #1000 rst_n = 1'b1; clr = 1'b0;
    vco_en = 1'b1;
    repeat (5) @(posedge clk);
    t0 = $time; repeat (20) @(posedge clk); t1 = $time;
    checks++;
    if ((t1 - t0) / 20 != 2 * 7 * (19841 / 500)) begin failures++; $display("FAIL period %0t", (t1 - t0) / 20); end
    // pattern load and playback
    // while loading the first bit is repeated; playback starts with its
    // second clock (sample low), after which bit PAT_W-2 follows
    load = 1'b1; repeat (4) @(posedge clk); load = 1'b0;
    do @(negedge clk); while (sample);
    k = 1;
    while (k < 65) begin
      @(negedge clk);
      if (sample) begin
        checks++;
        if (data !== pat[PAT_W - 1 - (k % PAT_W)]) begin
          failures++; $display("FAIL pattern bit %0d", k);
        end
        k++;
      end
    end
    // error counting window
    @(negedge clk) clr = 1'b1; @(negedge clk) clr = 1'b0;
    exp0 = 0; exp1 = 0;
    repeat (10) @(negedge clk);
    win = 1'b1;
    repeat (300) @(negedge clk);
    win = 1'b0;
    repeat (10) @(negedge clk);
    checks += 2;
    if (c0 !== CNT_W'(exp0)) begin failures++; $display("FAIL cnt0=%0d exp=%0d", c0, exp0); end
    if (c1 !== CNT_W'(exp1)) begin failures++; $display("FAIL cnt1=%0d exp=%0d", c1, exp1); end
    // outside the window nothing is counted
    repeat (50) @(negedge clk);
    checks++;
    if (c0 !== CNT_W'(exp0) || c1 !== CNT_W'(exp1)) failures++;
    clr = 1'b1; #10;
    checks++;
    if (c0 !== '0 || c1 !== '0) failures++;
    clr = 1'b0;
    // power down: no more clock edges
    vco_en = 1'b0;
    #5000;
    k = 0;
    fork
      begin @(clk); k++; end
      #5000;
    join_any
    disable fork;
    checks++;
    if (k != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Assert the asynchronous reset/clear with an edge after time 0, so that
  // flip-flops starting at random values are cleared.
  initial begin
    #1;
    rst_n = 1'b0;
    clr = 1'b1;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
