// tb_xor_network: exhaustive test of the default XOR network.
// All 16 input words are applied; each output is compared with the
// generator's equations written out by hand:
//   a0 = o0^o1, a1 = o0^o1^o2, a2 = o0^o2^o3, a3 = o0^o1^o3.
// A second instance with an identity tap matrix checks that TAPS is honoured.
`timescale 1ns / 1ps
module tb_xor_network;
  logic [3:0] o, a, a_id, expv;
  int checks = 0, failures = 0;

  xor_network dut (.sr_out(o), .a(a));
  xor_network #(.N(4), .TAPS({4'b1000, 4'b0100, 4'b0010, 4'b0001})) dut_id (.sr_out(o), .a(a_id));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      o = 4'(v);
      #1;
      expv[0] = o[0] ^ o[1];
      expv[1] = o[0] ^ o[1] ^ o[2];
      expv[2] = o[0] ^ o[2] ^ o[3];
      expv[3] = o[0] ^ o[1] ^ o[3];
      checks++;
      if (a !== expv) begin
        failures++;
        $display("o=%b a=%b expected %b", o, a, expv);
      end
      checks++;
      if (a_id !== o) begin
        failures++;
        $display("identity taps: o=%b a=%b", o, a_id);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
