// tb_lutsr_rng: end-to-end test of the generator at its default parameters.
//
// A reference model, written from the recurrence rather than from the
// RTL's structure, predicts every output word: with ff(t) the D flip-flop
// word (seed at t = 0, q(t-1) afterwards) and depths 4, 4, 3, 2,
//   o_i(t)   = ff(t - depth_i)[i]   (0 while t < depth_i)
//   q(t+1)   = { o0^o1^o3, o0^o2^o3, o0^o1^o2, o0^o1 }.
// The test
//   * checks the first word after reset against a hand-worked value
//     (seed 1000: q is 0 for three clocks, then 1100),
//   * compares the generator with the model on every clock for one full
//     period plus 164 clocks, re-seeding twice before the long run,
//   * checks that the output repeats after exactly 2^21 - 1 clocks and not
//     after the period divided by any of its prime factors 7, 127, 337,
//   * checks that each output bit is one exactly 2^20 times per period,
//   * changes the delay-line settings every 1000 clocks.
// Each mechanism (reset with seed load, delay-line setting change, full
// period) is counted and must occur at least once.
`timescale 1ns / 1ps
module tb_lutsr_rng;
  localparam longint unsigned PERIOD = (64'd1 << 21) - 64'd1;
  localparam longint unsigned WIN = 64;

  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] seed;
  logic [3:0][5:0] dly_sel;
  logic [3:0] q;

  int checks = 0, failures = 0;
  int n_reset = 0, n_dly_change = 0, n_period = 0;

  lutsr_rng dut (.clk(clk), .rst(rst), .seed(seed), .dly_sel(dly_sel), .q(q));

  always #5 clk = ~clk;

  // Reference model state: ff history (ffh[k] = ff(t - k)) and q.
  logic [3:0] ffh [0:7];
  logic [3:0] mq;
  longint unsigned mt;

  function automatic logic [3:0] next_q();
    logic o0, o1, o2, o3;
    o0 = (mt >= 4) ? ffh[4][0] : 1'b0;
    o1 = (mt >= 4) ? ffh[4][1] : 1'b0;
    o2 = (mt >= 3) ? ffh[3][2] : 1'b0;
    o3 = (mt >= 2) ? ffh[2][3] : 1'b0;
    return {o0 ^ o1 ^ o3, o0 ^ o2 ^ o3, o0 ^ o1 ^ o2, o0 ^ o1};
  endfunction

  task automatic model_reset(input logic [3:0] s);
    for (int k = 0; k < 8; k++) ffh[k] = '0;
    ffh[0] = s;
    mq = '0;
    mt = 0;
  endtask

  task automatic model_step();
    logic [3:0] nq;
    nq = next_q();
    for (int k = 7; k > 0; k--) ffh[k] = ffh[k-1];
    ffh[0] = mq;
    mq = nq;
    mt++;
  endtask

  task automatic do_reset(input logic [3:0] s);
    seed = s;
    rst = 1'b1;
    @(posedge clk); #1;
    @(posedge clk); #1;
    rst = 1'b0;
    model_reset(s);
    n_reset++;
    checks++;
    if (q !== 4'b0000) begin
      failures++;
      $display("output not cleared by reset: %b", q);
    end
  endtask

  task automatic step_and_compare();
    @(posedge clk); #1;
    model_step();
    checks++;
    if (q !== mq) begin
      failures++;
      if (failures < 10) $display("t=%0d q=%b model=%b", mt, q, mq);
    end
  endtask

  initial begin
    #50_000_000;  // 5 ms of simulated time = 5M clocks
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] win0 [WIN];
  logic [3:0] winp [WIN];
  longint unsigned ones [4];
  longint unsigned t;
  int first_nz;
  bit differs = 0;

  initial begin
    dly_sel = '0;
    seed = 4'b0001;

    // 1. Hand-worked start: seed 1000 reaches the output three clocks
    //    after reset through lane 3 (depth 2), giving a2 = a3 = 1.
    do_reset(4'b1000);
    first_nz = -1;
    for (int c = 1; c <= 6; c++) begin
      step_and_compare();
      if (first_nz < 0 && q != 4'b0000) begin
        first_nz = c;
        checks++;
        if (q !== 4'b1100) begin
          failures++;
          $display("first word after reset %b, expected 1100", q);
        end
      end
    end
    checks++;
    if (first_nz != 3) begin
      failures++;
      $display("seed reached the output after %0d clocks, expected 3", first_nz);
    end

    // 2. A short run with another seed, then re-seed mid-stream.
    do_reset(4'b0110);
    for (int c = 0; c < 500; c++) step_and_compare();
    do_reset(4'b0001);

    // 3. One full period plus a window, compared with the model each clock.
    for (int b = 0; b < 4; b++) ones[b] = 0;
    for (t = 1; t < 100 + PERIOD + WIN; t++) begin
      if (t % 1000 == 0) begin
        for (int i = 0; i < 4; i++) dly_sel[i] = 6'($urandom);
        n_dly_change++;
      end
      step_and_compare();
      if (t <= PERIOD)
        for (int b = 0; b < 4; b++) ones[b] += longint'(q[b]);
      if (t >= 100 && t < 100 + WIN) win0[int'(t - 100)] = q;
      if (t >= 100 + PERIOD && t < 100 + PERIOD + WIN) winp[int'(t - 100 - PERIOD)] = q;
      // The window must differ at the period divided by each prime factor.
      if (t >= 100 + PERIOD / 7   && t < 100 + PERIOD / 7   + WIN && q != win0[int'(t - 100 - PERIOD / 7)])   differs = 1;
      if (t == 100 + PERIOD / 7 + WIN - 1) begin
        checks++;
        if (!differs) begin failures++; $display("output repeats after PERIOD/7"); end
        differs = 0;
      end
      if (t >= 100 + PERIOD / 127 && t < 100 + PERIOD / 127 + WIN && q != win0[int'(t - 100 - PERIOD / 127)]) differs = 1;
      if (t == 100 + PERIOD / 127 + WIN - 1) begin
        checks++;
        if (!differs) begin failures++; $display("output repeats after PERIOD/127"); end
        differs = 0;
      end
      if (t >= 100 + PERIOD / 337 && t < 100 + PERIOD / 337 + WIN && q != win0[int'(t - 100 - PERIOD / 337)]) differs = 1;
      if (t == 100 + PERIOD / 337 + WIN - 1) begin
        checks++;
        if (!differs) begin failures++; $display("output repeats after PERIOD/337"); end
        differs = 0;
      end
    end

    differs = 0;
    for (int k = 0; k < int'(WIN); k++) if (winp[k] != win0[k]) differs = 1;
    checks++;
    if (differs) begin
      failures++;
      $display("output does not repeat after 2^21-1 clocks");
    end else n_period++;

    for (int b = 0; b < 4; b++) begin
      checks++;
      if (ones[b] != (64'd1 << 20)) begin
        failures++;
        $display("bit %0d was one %0d times in a period, expected %0d", b, ones[b], 64'd1 << 20);
      end
    end

    $display("mechanisms: resets=%0d delay_setting_changes=%0d full_periods=%0d",
             n_reset, n_dly_change, n_period);
    if (n_reset == 0)      begin failures++; $display("reset never exercised"); end
    if (n_dly_change == 0) begin failures++; $display("delay settings never changed"); end
    if (n_period == 0)     begin failures++; $display("full period never observed"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
