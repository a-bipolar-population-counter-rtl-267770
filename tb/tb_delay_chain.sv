// tb_delay_chain: checks that the rough-tuning delay element passes a dual-rail
// signal unchanged, arriving exactly STAGES * GATE_DELAY later, and that with
// STAGES = 0 it is a plain connection.
module tb_delay_chain;
  import popcount_pkg::*;
  localparam int unsigned D = 40;
  localparam int unsigned S = 3;

  rail_t a, y, y0;
  int unsigned checks = 0, failures = 0;

  delay_chain #(.STAGES(S), .GATE_DELAY(D)) dut  (.a, .y);
  delay_chain #(.STAGES(0), .GATE_DELAY(D)) dut0 (.a, .y(y0));

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
    a = RAIL0;
    #(S * D + 10);
    check("settled 0", y, RAIL0);
    for (int n = 0; n < 8; n++) begin
      rail_t prev, nv;
      prev = a;
      nv = '{t: ~prev.t, f: prev.t};
      a = nv;
      #1;
      check("zero-stage chain", y0, nv);
      #(S * D - 2);
      check("before delay", y, prev);
      #2;
      check("after delay", y, nv);
      #(D);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
