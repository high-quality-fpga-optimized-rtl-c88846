// output_memory: the clocked register that holds the generator's output word.
//
// It registers the XOR results a[N] as q[N]; q is both the random output and
// the value fed back to the lanes. The reference design draws it as a
// clocked "memory" one bit per lane; here it is a plain N-bit register, one
// word deep. The synchronous clear to zero is this design's choice.
//
// Interface: clk, rst, a[N] in; q[N] out.
// Timing: q = a one clock after it is presented.
`timescale 1ns / 1ps
module output_memory #(
    parameter int unsigned N = 4
) (
    input  logic         clk,
    input  logic         rst,
    input  logic [N-1:0] a,
    output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= a;
  end

endmodule
