// tb_popcount_chip_full: the chip at its default parameters (63 inputs, 16 pins,
// ideal cells), taken through one complete test: every one of the 2^16 pin
// patterns, each followed by its complement as in a return-to-complement test
// sequence (131,072 vectors). Each count is compared with the sum of the pin
// weights (4 logic inputs per pin, 3 for pin 15), and every complement count
// must be the bitwise inverse of the count before it.
module tb_popcount_chip_full;
  localparam int unsigned N_PINS = 16;
  localparam int unsigned N_IN   = 63;
  localparam int unsigned W      = $clog2(N_IN + 1);

  logic [N_PINS-1:0] b;
  logic [W-1:0]      d;
  int unsigned checks = 0, failures = 0, vectors = 0;

  popcount_chip dut (.b, .d);

  function automatic logic [W-1:0] ref_count(logic [N_PINS-1:0] v);
    int unsigned n = 0;
    for (int unsigned i = 0; i < N_IN; i++) if (v[i % N_PINS]) n++;
    return W'(n);
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s b=%h d=%0d", what, b, d);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] first;
    for (int unsigned p = 0; p < 2**N_PINS; p++) begin
      b = N_PINS'(p);
      #1;
      check("count", d == ref_count(b));
      first = d;
      b = ~b;
      #1;
      check("complement count", d == ref_count(b));
      check("complement is bitwise inverse", d == ~first);
      vectors += 2;
    end
    $display("vectors applied: %0d", vectors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
