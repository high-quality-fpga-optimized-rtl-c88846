// xor_network: the fixed wiring and XOR gates that form the next output word.
//
// Output bit a[j] is the XOR of those shift-register outputs sr_out[i] whose
// bit TAPS[j][i] is set. The structure, a fixed fan-out network from the
// lane outputs to one XOR per output bit, is the reference design's; the
// default tap matrix is this design's choice (see rng_pkg), picked so the
// complete generator has maximal period.
//
// Interface: sr_out[N] in; a[N] out. Purely combinational.
`timescale 1ns / 1ps
module xor_network
  import rng_pkg::*;
#(
    parameter int unsigned                N    = LANES,
    parameter logic [N-1:0][N-1:0]        TAPS = DEFAULT_TAPS
) (
    input  logic [N-1:0] sr_out,
    output logic [N-1:0] a
);

  always_comb begin
    for (int j = 0; j < N; j++) a[j] = ^(sr_out & TAPS[j]);
  end

endmodule
