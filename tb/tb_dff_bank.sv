// tb_dff_bank: self-checking test of the D flip-flop row.
// Checks that reset loads the seed word and that, out of reset, q follows d
// exactly one clock later, over random seeds and random d words.
`timescale 1ns / 1ps
module tb_dff_bank;
  localparam int unsigned N = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0] seed, d, q, exp_q;
  int checks = 0, failures = 0;

  dff_bank #(.N(N)) dut (.clk(clk), .rst(rst), .seed(seed), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seed = 4'b1010; d = 4'b0101;
    for (int t = 0; t < 400; t++) begin
      rst  = (t % 50) < 2;
      if (t % 50 == 0) seed = 4'($urandom);
      d    = 4'($urandom);
      exp_q = rst ? seed : d;
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("t=%0d rst=%0b seed=%b d=%b q=%b expected %b", t, rst, seed, d, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
