// tb_cla_adder: exhaustive test of the 6-bit lookahead adder (all 4096 operand
// pairs, result modulo 64, both rails), plus a timed run with random operands
// checking that no sum bit ever changes except exactly five cell delays after
// an operand change (all paths balanced, no glitches).
module tb_cla_adder;
  import popcount_pkg::*;
  localparam int unsigned W = 6;
  localparam int unsigned D = 20;
  localparam int unsigned T = 7 * D;   // operand period, longer than the latency

  rail_t [W-1:0] a, b, s, s_t;
  logic  [W-1:0] s_t_val;
  int unsigned checks = 0, failures = 0;
  int unsigned changes = 0;
  time t_apply;
  bit  armed = 1'b0;   // set once the timed phase starts

  cla_adder #(.W(W))                 dut   (.a, .b, .s);
  cla_adder #(.W(W), .GATE_DELAY(D)) dut_t (.a, .b, .s(s_t));

  function automatic rail_t [W-1:0] rails(logic [W-1:0] v);
    rail_t [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = '{t: v[i], f: ~v[i]};
    return r;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  for (genvar i = 0; i < W; i++) begin : g_mon
    assign s_t_val[i] = s_t[i].t;
  end

  // Every change of the timed sum must land exactly 5 delays after an apply.
  always @(s_t_val) begin
    if (armed) begin
      changes++;
      check("sum changes only at apply + 5 delays", $time == t_apply + CLA_LEVELS * D);
    end
  end

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t_apply = 0;
    for (int x = 0; x < 64; x++)
      for (int y = 0; y < 64; y++) begin
        a = rails(W'(x));
        b = rails(W'(y));
        #1;
        check("sum value", s == rails(W'(x + y)));
      end
    #T;
    armed = 1'b1;
    for (int n = 0; n < 500; n++) begin
      logic [W-1:0] x, y;
      x = W'($urandom);
      y = W'($urandom);
      t_apply = $time;
      a = rails(x);
      b = rails(y);
      #T;
      check("timed sum value", s_t == rails(x + y));
    end
    check("timed sum changed at all", changes > 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
