// tb_scan_chain: self-checking test of the two-phase scan chain.
// Shifts random words in with non-overlapping PHI1/PHI2 pulses and checks the
// parallel outputs (cell 0 holds the last bit shifted) and that scan_out
// returns the previous word bit for bit; also checks the asynchronous clear.
`timescale 1ps/1ps
module tb_scan_chain;
  localparam int unsigned LEN = 129;
  logic rst_n = 1'b1, phi1 = 1'b0, phi2 = 1'b0, si = 1'b0, so;
  logic [LEN-1:0] cfg, w_old, w_new;
  int checks = 0, failures = 0;

  scan_chain #(.LEN(LEN)) dut (.rst_n(rst_n), .phi1(phi1), .phi2(phi2),
                               .scan_in(si), .scan_out(so), .cfg_o(cfg));

  task automatic shift_bit(input logic b, output logic out_b);
    out_b = so;
    si = b;
    #100 phi1 = 1'b1; #100 phi1 = 1'b0;
    #100 phi2 = 1'b1; #100 phi2 = 1'b0;
  endtask

  // Shifting bit LEN-1 first leaves word w in cfg (cell i = w[i]).
  task automatic shift_word(input logic [LEN-1:0] w, output logic [LEN-1:0] out_w);
    logic b;
    for (int i = LEN - 1; i >= 0; i--) begin
      shift_bit(w[i], b);
      out_w[LEN-1-i] = b;
    end
  endtask

  initial begin
    logic [LEN-1:0] got;
    #50 rst_n = 1'b1;
    checks++;
    if (cfg !== '0) failures++;
    w_old = '0;
    for (int r = 0; r < 6; r++) begin
      for (int i = 0; i < LEN; i++) w_new[i] = 1'($urandom);
      shift_word(w_new, got);
      checks++;
      if (cfg !== w_new) begin
        failures++;
        $display("FAIL cfg=%h exp=%h", cfg, w_new);
      end
      // The first bit out is cell LEN-1 of the previous word.
      for (int i = 0; i < LEN; i++) begin
        checks++;
        if (got[i] !== w_old[LEN-1-i]) failures++;
      end
      w_old = w_new;
    end
    rst_n = 1'b0;
    #10;
    checks++;
    if (cfg !== '0) failures++;
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
