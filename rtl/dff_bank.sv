// dff_bank: the row of D flip-flops at the head of the generator's lanes.
//
// Each lane's flip-flop captures that lane's fed-back output bit d[i] on the
// rising clock edge and hands it to the lane's shift register. The row of
// flip-flops with a reset pin and a common clock is the reference design's.
// How reset acts is this design's choice: an active-high synchronous reset
// loads the seed word, which is how a non-zero starting state enters the
// generator.
//
// Interface: clk, rst, seed[N], d[N] in; q[N] out.
// Timing: q = d (or seed during reset) one clock after it is presented.
`timescale 1ns / 1ps
module dff_bank #(
    parameter int unsigned N = 4
) (
    input  logic         clk,
    input  logic         rst,
    input  logic [N-1:0] seed,
    input  logic [N-1:0] d,
    output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst) q <= seed;
    else     q <= d;
  end

endmodule
