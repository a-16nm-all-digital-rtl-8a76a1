// tb_ic_datapath: checks the DUT datapath model. In measurement mode a rising
// edge must arrive after N_STAGES*rise and a falling edge after N_STAGES*fall;
// in stress mode the output shows the receiver-end stress level for either
// polarity; with both drivers off the output holds.
`timescale 1ps/1ps
module tb_ic_datapath;
  localparam int unsigned N = 5;
  logic d = 1'b0, drv = 1'b1, st = 1'b0, pol = 1'b0, q;
  int unsigned rise = 30, fall = 50;
  int checks = 0, failures = 0;

  ic_datapath #(.N_STAGES(N)) dut (.data_i(d), .drv_en_i(drv), .stress_en_i(st),
    .stress_pol_i(pol), .rise_ps_i(rise), .fall_ps_i(fall), .data_o(q));

  task automatic chk(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s q=%b exp=%b at %0t", what, q, exp, $time);
    end
  endtask

  task automatic edge_check(input logic v);
    int unsigned tot;
    tot = N * (v ? rise : fall);
    d = v;
    #(tot - 1) chk(~v, "before arrival");
    #2         chk(v, "after arrival");
    #2000;
  endtask

  initial begin
    #2000;
    edge_check(1); edge_check(0);
    rise = 120; fall = 20;
    edge_check(1); edge_check(0);
    rise = 25; fall = 140;
    edge_check(1); edge_check(0);
    // stress, polarity 0: receiver end high
    drv = 1'b0; st = 1'b1; pol = 1'b0;
    #10 chk(1'b1, "stress pol0");
    d = 1'b1; #1000 d = 1'b0; #1000 chk(1'b1, "stress pol0 ignores data");
    pol = 1'b1;
    #10 chk(1'b0, "stress pol1");
    // both off: hold
    st = 1'b0;
    d = 1'b1; #2000 chk(1'b0, "floating holds");
    drv = 1'b1;
    #2000 chk(1'b1, "drivers back on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
