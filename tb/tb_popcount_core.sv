// tb_popcount_core: self-checking test of the 63-input population counter core
// with ideal (zero-delay) cells.
//
// Applies all-zero, all-one, every one-hot and every "all but one" vector, runs
// of k ones for every k, and random vectors of varying density, and compares
// the count with a reference computed by a plain loop over the bits. It also
// checks that inverting every input turns the count n into 63 - n, and that
// the structure has the expected 20 cell levels.
module tb_popcount_core;
  import popcount_pkg::*;

  localparam int unsigned N_IN = 63;
  localparam int unsigned W    = $clog2(N_IN + 1);

  logic [N_IN-1:0] x;
  logic [W-1:0]    count;
  int unsigned     checks = 0, failures = 0;

  popcount_core #(.N_IN(N_IN)) dut (.x, .count);

  function automatic int unsigned ref_count(logic [N_IN-1:0] v);
    int unsigned n = 0;
    for (int i = 0; i < N_IN; i++) if (v[i]) n++;
    return n;
  endfunction

  task automatic apply(logic [N_IN-1:0] v);
    x = v;
    #1;
    checks++;
    if (count != W'(ref_count(v))) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h count=%0d expected=%0d", v, count, ref_count(v));
    end
    // Complement property of a 2^W - 1 input counter.
    x = ~v;
    #1;
    checks++;
    if (count != ~W'(ref_count(v))) begin
      failures++;
      if (failures < 10) $display("FAIL ~x=%h count=%0d expected=%0d", ~v, count, N_IN - ref_count(v));
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N_IN-1:0] v;
    checks++;
    if (core_depth(N_IN) != 20 || tree_stages(N_IN, W) != 7 || tree_counters(N_IN, W) != 59) begin
      failures++;
      $display("FAIL structure: depth=%0d stages=%0d counters=%0d",
               core_depth(N_IN), tree_stages(N_IN, W), tree_counters(N_IN, W));
    end
    apply('0);
    for (int i = 0; i < N_IN; i++) apply(N_IN'(1) << i);
    for (int k = 0; k <= N_IN; k++) begin
      v = '0;
      for (int i = 0; i < k; i++) v[i] = 1'b1;
      apply(v);
      apply(v << (N_IN - k));
    end
    for (int n = 0; n < 20000; n++) begin
      int unsigned density = $urandom_range(0, 16);
      for (int i = 0; i < N_IN; i++) v[i] = ($urandom_range(0, 15) < density);
      apply(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
