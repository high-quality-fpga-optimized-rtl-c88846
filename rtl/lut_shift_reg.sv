// lut_shift_reg: one lane's shift register, DEPTH stages deep.
//
// On an FPGA this maps to a LUT configured as a shift register (SRL). The
// bit from the lane's D flip-flop enters stage 0 each clock and moves one
// stage per clock; dout is the last stage, so dout equals din delayed by
// DEPTH clocks. The per-lane depths (4, 4, 3, 2 in the default generator)
// follow the reference design. The synchronous clear is this design's own
// addition so that simulation starts from a known state; LUT shift
// registers on the FPGA have no reset, and dropping it lets them map there.
//
// Interface: clk, rst, din in; dout out. DEPTH >= 1.
// Timing: DEPTH clocks from din to dout.
`timescale 1ns / 1ps
module lut_shift_reg #(
    parameter int unsigned DEPTH = 4
) (
    input  logic clk,
    input  logic rst,
    input  logic din,
    output logic dout
);

  logic [DEPTH-1:0] stages;

  always_ff @(posedge clk) begin
    if (rst) begin
      stages <= '0;
    end else begin
      stages[0] <= din;
      for (int s = 1; s < DEPTH; s++) stages[s] <= stages[s-1];
    end
  end

  assign dout = stages[DEPTH-1];

  initial assert (DEPTH >= 1) else $error("lut_shift_reg: DEPTH must be at least 1");

endmodule
