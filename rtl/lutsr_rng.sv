// lutsr_rng: LUT-shift-register random number generator with D-FF inputs.
//
// Every clock the generator emits an N_LANES-bit random word q. The word is
// fed back: bit q[i] passes through a programmable delay line into lane i's
// D flip-flop, then through lane i's shift register of DEPTH[i] stages. The
// XOR network combines the lane outputs into the next word, which the
// output register stores. The whole loop is a binary linear recurrence over
// GF(2): with o_i(t) = q_i(t - 1 - DEPTH[i]),
//     q_j(t+1) = XOR over i with TAPS[j][i] = 1 of q_i(t - 1 - DEPTH[i]).
// The lane structure, the four lanes and the depths 4, 4, 3, 2 follow the
// reference design. The tap matrix is this design's own choice; with it the
// 21-bit state has period 2^21 - 1 for every non-zero seed. Reset loads the
// seed word into the D flip-flops and clears everything else.
//
// Interface: clk, rst (synchronous, active high), seed[N_LANES],
// dly_sel[N_LANES][SEL_W] (delay-line settings, 1 ps per step); q[N_LANES].
// Timing: one new word per clock. After rst is released, the seed reaches
// the output register after DEPTH[i] + 1 clocks.
//
// The delay lines are behavioural models with picosecond delays; their
// delays are far below a clock period, so they do not change the sequence.
// For synthesis, a delay line reduces to a wire.
`timescale 1ns / 1ps
module lutsr_rng
  import rng_pkg::*;
#(
    parameter int unsigned                        N_LANES = LANES,
    parameter logic [N_LANES-1:0][DEPTH_W-1:0]    DEPTH   = DEFAULT_DEPTH,
    parameter logic [N_LANES-1:0][N_LANES-1:0]    TAPS    = DEFAULT_TAPS,
    parameter int unsigned                        DSEL_W  = SEL_W
) (
    input  logic                           clk,
    input  logic                           rst,
    input  logic [N_LANES-1:0]             seed,
    input  logic [N_LANES-1:0][DSEL_W-1:0] dly_sel,
    output logic [N_LANES-1:0]             q
);

  logic [N_LANES-1:0] d;       // feedback after the delay lines
  logic [N_LANES-1:0] ff_q;    // D flip-flop outputs
  logic [N_LANES-1:0] sr_out;  // shift-register outputs out0..out3
  logic [N_LANES-1:0] a;       // XOR results a0..a3

  for (genvar i = 0; i < N_LANES; i++) begin : g_lane
    delay_line #(.SEL_W(DSEL_W), .STEP_PS(1)) u_dly (
        .din (q[i]),
        .sel (dly_sel[i]),
        .dout(d[i])
    );

    lut_shift_reg #(.DEPTH(int'(DEPTH[i]))) u_sr (
        .clk (clk),
        .rst (rst),
        .din (ff_q[i]),
        .dout(sr_out[i])
    );
  end

  dff_bank #(.N(N_LANES)) u_dff (
      .clk (clk),
      .rst (rst),
      .seed(seed),
      .d   (d),
      .q   (ff_q)
  );

  xor_network #(.N(N_LANES), .TAPS(TAPS)) u_xor (
      .sr_out(sr_out),
      .a     (a)
  );

  output_memory #(.N(N_LANES)) u_mem (
      .clk(clk),
      .rst(rst),
      .a  (a),
      .q  (q)
  );

endmodule
