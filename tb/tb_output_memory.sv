// tb_output_memory: self-checking test of the output register.
// Checks the synchronous clear and that q equals a one clock later, over
// random words.
`timescale 1ns / 1ps
module tb_output_memory;
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] a, q, exp_q;
  int checks = 0, failures = 0;

  output_memory #(.N(4)) dut (.clk(clk), .rst(rst), .a(a), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      rst = (t < 2) || (t % 97 == 0);
      a = 4'($urandom);
      exp_q = rst ? 4'b0000 : a;
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("t=%0d rst=%0b a=%b q=%b expected %b", t, rst, a, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
