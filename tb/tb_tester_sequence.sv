// tb_tester_sequence: the production-style test program of the chip, run on a
// timed model (one time unit stands for 1 ps; each cell 425 units, so the
// core's propagation delay is 20 * 425 = 8500 units, 8.5 ns).
//
//   1. Functional test at 40 MHz: 20,000 random pin vectors, one every 25 ns,
//      every count checked on the ideal chip, the first 1,000 also on the
//      timed chip.
//   2. Wave-pipelined return-to-complement sequences on the rough-tuned timed
//      chip: random vectors each followed by their complement, at vector
//      periods of 4.250, 4.125, 4.000 and 3.875 ns (235-258 MHz). Each wave's
//      count is checked at the start and at the end of its window at the pins.
//   3. Delay test: the time from a pin change to the last output change must be
//      the core's propagation delay, and no output may move before it.
//   4. Valid-window test at 200 MHz (5 ns): the shortest time between two
//      successive output changes must be a full period (each wave holds the
//      outputs for 5 ns).
// The wave sequences are shorter than a real tester's 40,000 vectors
// (N_WAVE vectors per rate) to keep the event-driven simulation short.
module tb_tester_sequence;
  import popcount_pkg::*;

  localparam int unsigned N_PINS = 16;
  localparam int unsigned N_IN   = 63;
  localparam int unsigned W      = $clog2(N_IN + 1);
  localparam int unsigned GD     = 425;
  localparam int unsigned TP     = core_depth(N_IN) * GD;
  localparam int unsigned N_FUNC = 20000;
  localparam int unsigned N_FUNC_TIMED = 1000;
  localparam int unsigned N_WAVE = 1000;

  logic [N_PINS-1:0] b;
  logic [W-1:0]      d_ideal, d_wave;
  int unsigned checks = 0, failures = 0, waves = 0;

  popcount_chip                    dut_ideal (.b, .d(d_ideal));
  popcount_chip #(.GATE_DELAY(GD)) dut_wave  (.b, .d(d_wave));

  function automatic logic [W-1:0] ref_count(logic [N_PINS-1:0] v);
    int unsigned n = 0;
    for (int unsigned i = 0; i < N_IN; i++) if (v[i % N_PINS]) n++;
    return W'(n);
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Output change times of the timed chip.
  time t_last_change, min_gap;
  bit  track;
  always @(d_wave) begin
    if (track) begin
      if ($time - t_last_change < min_gap) min_gap = $time - t_last_change;
      t_last_change = $time;
    end
  end

  // Return-to-complement sequence at vector period t; each wave sampled right
  // after it arrives and right before the next one arrives.
  task automatic rtc_sequence(int unsigned t, int unsigned nvec);
    logic [W-1:0] exp_q[$];
    fork
      begin
        for (int unsigned k = 0; k < nvec; k++) begin
          if (k % 2 == 0) b = N_PINS'($urandom);
          else            b = ~b;
          exp_q.push_back(ref_count(b));
          #(t);
        end
      end
      begin
        #(TP + 1);
        for (int unsigned k = 0; k < nvec; k++) begin
          check("wave arrives", d_wave == exp_q[k]);
          #(t - 2);
          check("wave still valid", d_wave == exp_q[k]);
          if (k % 2 == 1) check("complement inverts", d_wave == ~exp_q[k-1]);
          waves++;
          #2;
        end
      end
    join
    #(2 * TP);
  endtask

  initial begin : watchdog
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    track = 1'b0;
    b = '0;
    #(2 * TP);

    // 1. 40 MHz functional test.
    for (int unsigned k = 0; k < N_FUNC; k++) begin
      b = N_PINS'($urandom);
      #25000;
      check("40 MHz functional", d_ideal == ref_count(b));
      if (k < N_FUNC_TIMED) check("40 MHz functional, timed chip", d_wave == ref_count(b));
    end

    // 2. Wave-pipelined sequences at the measured rates.
    rtc_sequence(4250, N_WAVE);
    rtc_sequence(4125, N_WAVE);
    rtc_sequence(4000, N_WAVE);
    rtc_sequence(3875, N_WAVE);

    // 3. Delay test: from a full inversion of all pins to the output change.
    for (int unsigned k = 0; k < 20; k++) begin
      time t0;
      b = N_PINS'($urandom);
      #(2 * TP);
      t0 = $time;
      t_last_change = t0;
      track = 1'b1;
      min_gap = 64'hFFFF_FFFF;
      b = ~b;
      #(2 * TP);
      track = 1'b0;
      check("propagation delay is 20 cell delays", t_last_change - t0 == TP);
    end

    // 4. Valid window at 200 MHz.
    b = '0;
    #(2 * TP);
    t_last_change = $time;
    min_gap = 64'hFFFF_FFFF;
    track = 1'b1;
    for (int unsigned k = 0; k < 200; k++) begin
      b = (k % 2 == 0) ? N_PINS'($urandom) : ~b;
      #5000;
    end
    #(2 * TP);
    track = 1'b0;
    $display("valid window at 200 MHz: %0d units", min_gap);
    check("valid window is a full period at 200 MHz", min_gap == 5000);

    $display("waves checked: %0d", waves);
    check("all wave sequences ran", waves == 4 * N_WAVE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
