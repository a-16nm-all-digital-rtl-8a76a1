// tb_ber_sampler: self-checking test of the local BER sampler.
// Random REF/DUT values, sample strobes and measure enables are applied; a
// reference pipeline captures REF/DUT when the strobe is high and predicts the
// two error strobes one clock later.
`timescale 1ps/1ps
module tb_ber_sampler;
  import em_ber_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, sample = 1'b0, meas = 1'b0, r = 1'b0, d = 1'b0;
  err_pair_t err;
  logic rq = 1'b0, dq = 1'b0, vq = 1'b0;
  int checks = 0, failures = 0, n0 = 0, n1 = 0;

  ber_sampler dut (.clk(clk), .rst_n(rst_n), .sample_i(sample), .meas_en_i(meas),
                   .ref_i(r), .dut_i(d), .err_o(err));

  always #250 clk = ~clk;

  initial begin
    logic e0, e1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      sample = 1'($urandom);
      meas   = ($urandom_range(0, 7) != 0);
      r      = 1'($urandom);
      d      = 1'($urandom);
      @(posedge clk);
      vq = sample;
      if (sample) begin rq = r; dq = d; end
      @(negedge clk);
      e1 = meas & vq & rq & ~dq;
      e0 = meas & vq & ~rq & dq;
      checks++;
      if (err.err1 !== e1 || err.err0 !== e0) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d err=%b%b exp=%b%b", i, err.err0, err.err1, e0, e1);
      end
      n0 += int'(e0);
      n1 += int'(e1);
    end
    checks++;
    if (n0 == 0 || n1 == 0) failures++;
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
