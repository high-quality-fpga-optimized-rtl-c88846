// delay_line: behavioural model of one programmable delay line.
//
// This is a behavioural model, not synthesizable logic. The real part is a
// chain of FPGA programmable interconnect points whose delay is set in
// 1 ps steps by rewriting the routing at run time; it sits on each lane's
// feedback path, between the output register and the lane's D flip-flop.
// The model is a transport delay: every change on din appears on dout
// sel * STEP_PS picoseconds later. The 1 ps step follows the reference
// design; the 6-bit setting range (0..63 ps) is this design's choice.
//
// Interface: din, sel[SEL_W] in; dout out. No clock.
// A setting of 0 is a real zero delay, so the simulator's note that the
// delay may be #0 is expected here.
`timescale 1ns / 1ps
module delay_line #(
    parameter int unsigned SEL_W   = 6,
    parameter int unsigned STEP_PS = 1
) (
    input  logic             din,
    input  logic [SEL_W-1:0] sel,
    output logic             dout
);

  initial dout = din;

  // One forked process per input change keeps every edge, however close
  // together, so the model is a pure transport delay.
  always @(din) begin
    automatic logic v = din;
    automatic int unsigned steps = STEP_PS * sel;
    fork
      begin
        #(steps * 1ps);
        dout = v;
      end
    join_none
  end

endmodule
