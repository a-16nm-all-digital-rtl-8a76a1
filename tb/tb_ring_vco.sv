// tb_ring_vco: measures the VCO model's period at several supplies against
// 2*STAGES*floor(K/(Vdd-Vth)) and checks that the ring rests high when
// disabled or starved.
`timescale 1ps/1ps
module tb_ring_vco;
  localparam int unsigned STAGES = 7, VTH = 300, K = 19841;
  logic en = 1'b0, clk;
  int unsigned vdd = 800;
  int checks = 0, failures = 0;

  ring_vco #(.STAGES(STAGES), .VTH_MV(VTH), .K_PS_MV(K)) dut (.en_i(en), .vdd_mv_i(vdd), .clk_o(clk));

  task automatic measure(input int unsigned v);
    time t0, t1;
    int unsigned exp;
    vdd = v;
    repeat (4) @(posedge clk);
    t0 = $time;
    repeat (10) @(posedge clk);
    t1 = $time;
    exp = 2 * STAGES * (K / (v - VTH));
    checks++;
    if (int'((t1 - t0) / 10) != exp) begin
      failures++;
      $display("FAIL vdd=%0d period=%0t exp=%0d", v, (t1 - t0) / 10, exp);
    end else $display("vdd=%0d mV period=%0d ps", v, exp);
  endtask

  initial begin
    int edges;
    #1000;
    checks++;
    if (clk !== 1'b1) failures++;
    en = 1'b1;
    measure(800);
    measure(1000);
    measure(600);
    en = 1'b0;
    #2000;
    edges = 0;
    fork
      begin @(clk); edges++; end
      #5000;
    join_any
    disable fork;
    checks++;
    if (edges != 0 || clk !== 1'b1) failures++;
    en = 1'b1; vdd = 250;
    #5000;
    checks++;
    if (clk !== 1'b1) failures++;
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
