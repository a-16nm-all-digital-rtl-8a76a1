// tb_ref_buffer: checks that the reference buffer model follows its input
// after exactly DELAY_PS, for both edges.
`timescale 1ps/1ps
module tb_ref_buffer;
  localparam int unsigned D = 20;
  logic a = 1'b0, y;
  int checks = 0, failures = 0;

  ref_buffer #(.DELAY_PS(D)) dut (.a_i(a), .y_o(y));

  task automatic edge_check(input logic v);
    a = v;
    #(D - 1);
    checks++;
    if (y !== ~v) failures++;
    #2;
    checks++;
    if (y !== v) failures++;
    #100;
  endtask

  initial begin
    #100;
    for (int i = 0; i < 20; i++) edge_check(i % 2 == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
