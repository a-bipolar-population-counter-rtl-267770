// tb_popcount_chip: end-to-end test of the chip, with timed cells, in the way
// the chip is meant to run: wave pipelined.
//
// One time unit stands for 1 ps. Each cell takes GD = 425 units, so the
// 20-level core has a propagation delay t_p = 8500 units (8.5 ns). Three
// copies of the chip share the pins:
//   ideal  - zero-delay cells (default parameters)
//   wave   - timed cells, rough tuned (all paths 20 levels)
//   raw    - timed cells, without the rough-tuning pads (unbalanced)
// Mechanisms exercised, each counted and required at least once:
//   pin sharing       - a single pin high gives a count of 4 (pins 0..14) or
//                       3 (pin 15);
//   wave pipelining   - vectors applied every 4 ns (250 MHz) while t_p is
//                       8.5 ns, so three waves are inside the logic at once;
//                       each wave's count is checked at the start and at the
//                       end of its 4 ns window at the outputs;
//   return to complement - every vector is followed by its complement, and
//                       the output must be the bitwise inverse;
//   rough tuning      - the unbalanced copy gives wrong counts at 4 ns (waves
//                       collide) but correct ones at 10 ns (100 MHz, plain
//                       single-wave operation).
// Expected counts come from the pin weights (4 or 3), not from the design.
module tb_popcount_chip;
  import popcount_pkg::*;

  localparam int unsigned N_PINS = 16;
  localparam int unsigned N_IN   = 63;
  localparam int unsigned W      = $clog2(N_IN + 1);
  localparam int unsigned GD     = 425;
  localparam int unsigned TP     = core_depth(N_IN) * GD;

  logic [N_PINS-1:0] b;
  logic [W-1:0]      d_ideal, d_wave, d_raw;

  int unsigned checks = 0, failures = 0;
  int unsigned n_pin_weight = 0, n_complement = 0, max_in_flight = 0;
  int unsigned n_waves_ok = 0, n_collisions = 0, n_slow_ok = 0;

  popcount_chip                                         dut_ideal (.b, .d(d_ideal));
  popcount_chip #(.GATE_DELAY(GD))                      dut_wave  (.b, .d(d_wave));
  popcount_chip #(.GATE_DELAY(GD), .ROUGH_TUNE(1'b0))   dut_raw   (.b, .d(d_raw));

  // Number of logic inputs wired to pin p: inputs i with i mod 16 == p.
  function automatic int unsigned weight(int unsigned p);
    return (p < N_IN % N_PINS) ? N_IN / N_PINS + 1 : N_IN / N_PINS;
  endfunction

  function automatic logic [W-1:0] ref_count(logic [N_PINS-1:0] v);
    int unsigned n = 0;
    for (int unsigned p = 0; p < N_PINS; p++) if (v[p]) n += weight(p);
    return W'(n);
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Applies nvec vectors, one every t units, each followed by its complement, and
  // samples the selected copy's output at apply + lat for every vector.
  // Returns the number of wrong samples; optionally counts them as failures.
  task automatic run_waves(bit raw, int unsigned t, int unsigned lat, int unsigned nvec,
                           bit must_pass, output int unsigned bad);
    logic [W-1:0] exp_q[$];
    logic [W-1:0] got_prev;
    int unsigned  applied, sampled, bad_l;
    applied = 0;
    sampled = 0;
    bad_l   = 0;
    got_prev = '0;
    fork
      begin : drive
        for (int unsigned k = 0; k < nvec; k++) begin
          if (k % 2 == 0) b = N_PINS'($urandom);
          else            b = ~b;
          exp_q.push_back(ref_count(b));
          applied++;
          #(t);
        end
      end
      begin : sample
        #(lat);
        for (int unsigned k = 0; k < nvec; k++) begin
          logic [W-1:0] got;
          got = raw ? d_raw : d_wave;
          if (applied - sampled > max_in_flight) max_in_flight = applied - sampled;
          if (got != exp_q[k]) bad_l++;
          if (must_pass) begin
            check("wave count", got == exp_q[k]);
            if (k % 2 == 1) begin
              check("complement wave is bitwise inverse", got == ~got_prev);
              n_complement++;
            end
          end
          got_prev = got;
          sampled++;
          #(t);
        end
      end
    join
    bad = bad_l;
  endtask

  initial begin : watchdog
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned bad;

    check("core depth is 20 levels", core_depth(N_IN) == 20);

    // Pin sharing, ideal copy.
    for (int unsigned p = 0; p < N_PINS; p++) begin
      b = N_PINS'(1) << p;
      #1;
      check("single pin weight", d_ideal == W'(weight(p)));
      n_pin_weight++;
    end
    b = '0;
    #(2 * TP);

    // Wave pipelining at 250 MHz: three waves in flight. Sample each wave just
    // after it arrives and just before the next one does.
    run_waves(1'b0, 4000, TP + 1, 400, 1'b1, bad);
    n_waves_ok += 400 - bad;
    #(2 * TP);
    run_waves(1'b0, 4000, TP + 4000 - 1, 400, 1'b1, bad);
    n_waves_ok += 400 - bad;
    #(2 * TP);

    // Same stimulus rate on the untuned copy: waves collide.
    run_waves(1'b1, 4000, TP + 2000, 400, 1'b0, bad);
    n_collisions += bad;
    #(2 * TP);

    // The untuned copy works as an ordinary circuit at 10 ns (100 MHz).
    run_waves(1'b1, 10000, 10000 - 1, 200, 1'b0, bad);
    check("untuned circuit correct at 100 MHz", bad == 0);
    n_slow_ok += 200 - bad;

    $display("pin weights %0d, waves correct %0d, complements %0d, max waves in flight %0d",
             n_pin_weight, n_waves_ok, n_complement, max_in_flight);
    $display("untuned: wrong samples at 250 MHz %0d, correct at 100 MHz %0d",
             n_collisions, n_slow_ok);
    check("pin sharing seen", n_pin_weight == N_PINS);
    check("waves checked", n_waves_ok > 0);
    check("return to complement seen", n_complement > 0);
    check("at least two waves in flight", max_in_flight >= 2);
    check("untuned circuit collides at 250 MHz", n_collisions > 0);
    check("untuned circuit works slowly", n_slow_ok > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
