// tb_counter_3_2: exhaustive test of the 3-2 counter (sum = parity, carry =
// majority, both rails), plus a timed run checking that sum and carry both
// arrive exactly two cell delays after the inputs change.
module tb_counter_3_2;
  import popcount_pkg::*;
  localparam int unsigned D = 30;

  rail_t a, b, c, s, co, s_t, co_t;
  int unsigned checks = 0, failures = 0;

  counter_3_2                    dut   (.a, .b, .c, .s, .co);
  counter_3_2 #(.GATE_DELAY(D))  dut_t (.a, .b, .c, .s(s_t), .co(co_t));

  function automatic rail_t r(logic v);
    return '{t: v, f: ~v};
  endfunction

  task automatic check(string what, rail_t got, rail_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ones;
    a = r(0); b = r(0); c = r(0);
    #(4 * D);
    for (int v = 0; v < 8; v++) begin
      rail_t ps, pc;
      ps = s_t; pc = co_t;
      a = r(v[0]); b = r(v[1]); c = r(v[2]);
      ones = v[0] + v[1] + v[2];
      #1;
      check("sum", s, r(ones[0]));
      check("carry", co, r(ones[1]));
      #(2 * D - 2);
      check("timed sum before 2 delays", s_t, ps);
      check("timed carry before 2 delays", co_t, pc);
      #2;
      check("timed sum", s_t, r(ones[0]));
      check("timed carry", co_t, r(ones[1]));
      #(2 * D);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
