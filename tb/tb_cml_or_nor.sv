// tb_cml_or_nor: checks the OR/NOR cell exhaustively for fan-in 2 (ideal) and
// fan-in 3 (timed), and checks that the timed cell's outputs change exactly
// GATE_DELAY after the input, both outputs together.
module tb_cml_or_nor;
  localparam int unsigned D = 50;

  logic [1:0] a2;
  logic       y2, y2_n;
  logic [2:0] a3;
  logic       y3, y3_n;
  int unsigned checks = 0, failures = 0;

  cml_or_nor #(.N(2))                 dut2 (.a(a2), .y(y2), .y_n(y2_n));
  cml_or_nor #(.N(3), .GATE_DELAY(D)) dut3 (.a(a3), .y(y3), .y_n(y3_n));

  task automatic check(string what, logic got, logic exp);
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
    for (int v = 0; v < 4; v++) begin
      a2 = 2'(v);
      #1;
      check("or2", y2, v != 0);
      check("nor2", y2_n, v == 0);
    end
    a3 = '0;
    #(2 * D);
    for (int v = 1; v < 8; v++) begin
      logic prev;
      prev = |a3;
      a3 = 3'(v);
      #(D - 1);
      check("or3 before delay", y3, prev);
      check("nor3 before delay", y3_n, ~prev);
      #2;
      check("or3 after delay", y3, 1'b1);
      check("nor3 after delay", y3_n, 1'b0);
      a3 = '0;
      #(D + 1);
      check("or3 back to 0", y3, 1'b0);
      check("nor3 back to 1", y3_n, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
