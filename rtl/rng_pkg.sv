// rng_pkg: constants shared by the LUT-shift-register random number generator.
//
// The generator has four lanes. Each lane is a D flip-flop followed by a
// shift register; the shift-register outputs are combined by an XOR network
// and registered as the next output word, which is fed back to the lanes.
// The lane count and the shift-register depths (4, 4, 3, 2) follow the
// reference drawing of the design. The XOR tap matrix is this design's own
// choice: it makes the 21-bit state (4 flip-flops + 13 shift stages + 4
// output bits) follow a primitive characteristic polynomial, so every
// non-zero seed gives the maximal period of 2^21 - 1 clocks.
`timescale 1ns / 1ps
package rng_pkg;

  localparam int unsigned LANES   = 4;   // output bits per clock
  localparam int unsigned DEPTH_W = 8;   // width of one shift-register depth entry
  localparam int unsigned SEL_W   = 6;   // delay-line setting width (0..63 steps)

  // Shift-register depth of each lane, lane 0 in the lowest entry.
  localparam logic [LANES-1:0][DEPTH_W-1:0] DEFAULT_DEPTH =
      {8'd2, 8'd3, 8'd4, 8'd4};

  // TAPS[j][i] = 1 when shift-register output i feeds XOR output j.
  //   a0 = o0 ^ o1
  //   a1 = o0 ^ o1 ^ o2
  //   a2 = o0 ^ o2 ^ o3
  //   a3 = o0 ^ o1 ^ o3
  localparam logic [LANES-1:0][LANES-1:0] DEFAULT_TAPS =
      {4'b1011, 4'b1101, 4'b0111, 4'b0011};

endpackage
