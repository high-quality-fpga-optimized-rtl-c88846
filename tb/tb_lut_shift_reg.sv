// tb_lut_shift_reg: self-checking test of the lane shift register.
// Instances of depth 4, 3 and 2 (the depths of the generator's lanes) and 1
// are driven with the same random bit stream; each output must equal the
// input delayed by exactly its depth, and zero for the first clocks after a
// synchronous clear.
`timescale 1ns / 1ps
module tb_lut_shift_reg;
  logic clk = 1'b0, rst = 1'b1, din = 1'b0;
  logic [3:0] dout;   // dout[k-1] comes from the depth-k instance
  logic [63:0] hist;  // hist[0] = din one clock ago, hist[1] two clocks ago, ...
  int since_rst;
  int checks = 0, failures = 0;

  lut_shift_reg #(.DEPTH(1)) u1 (.clk(clk), .rst(rst), .din(din), .dout(dout[0]));
  lut_shift_reg #(.DEPTH(2)) u2 (.clk(clk), .rst(rst), .din(din), .dout(dout[1]));
  lut_shift_reg #(.DEPTH(3)) u3 (.clk(clk), .rst(rst), .din(din), .dout(dout[2]));
  lut_shift_reg #(.DEPTH(4)) u4 (.clk(clk), .rst(rst), .din(din), .dout(dout[3]));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist = '0;
    since_rst = 0;
    for (int t = 0; t < 600; t++) begin
      rst = (t < 2) || (t == 300);
      din = 1'($urandom);
      @(posedge clk); #1;
      if (rst) begin
        hist = '0;
        since_rst = 0;
      end else begin
        hist = {hist[62:0], din};
        since_rst++;
      end
      for (int k = 1; k <= 4; k++) begin
        logic expv;
        expv = (since_rst >= k) ? hist[k-1] : 1'b0;
        checks++;
        if (dout[k-1] !== expv) begin
          failures++;
          $display("t=%0d depth=%0d dout=%b expected %b", t, k, dout[k-1], expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
