// tb_delay_line: self-checking test of the delay-line model.
// For a range of settings, a single edge is applied to din and the time of
// the matching edge on dout is measured; it must be sel * 1 ps after the
// input edge. A pulse shorter than the delay must also arrive intact
// (transport delay).
`timescale 1ns / 1ps
module tb_delay_line;
  logic din = 1'b0, dout;
  logic [5:0] sel;
  realtime t_in, t_out;
  int checks = 0, failures = 0;

  delay_line #(.SEL_W(6), .STEP_PS(1)) dut (.din(din), .sel(sel), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = 6'd0;
    #1;
    for (int s = 1; s < 64; s += 5) begin
      sel = 6'(s);
      #1;
      t_in = $realtime;
      din = ~din;
      @(dout);
      t_out = $realtime;
      checks++;
      if (dout !== din || (t_out - t_in) < (s * 0.001 - 0.0001) || (t_out - t_in) > (s * 0.001 + 0.0001)) begin
        failures++;
        $display("sel=%0d delay measured %0.4f ns, expected %0.4f ns", s, t_out - t_in, s * 0.001);
      end
    end
    // A 10 ps pulse through a 40 ps line keeps its width.
    sel = 6'd40;
    din = 1'b0;
    #1;
    din = 1'b1; #0.010; din = 1'b0;
    @(posedge dout); t_in = $realtime;
    @(negedge dout); t_out = $realtime;
    checks++;
    if ((t_out - t_in) < 0.0099 || (t_out - t_in) > 0.0101) begin
      failures++;
      $display("pulse width out %0.4f ns, expected 0.010 ns", t_out - t_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
