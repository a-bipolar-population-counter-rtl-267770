// popcount_chip: the wave-pipelined 63-bit population counter as a chip.
//
// Input pins b[15:0] (B00..B15) each drive several of the 63 logic inputs of
// popcount_core: logic input i is wired to pin i mod 16, so pins 0..14 drive
// four inputs and pin 15 drives three. The six output pins d[5:0] (D00..D05)
// carry the count. All 2^16 pin patterns can be applied, and inverting every
// pin inverts every logic input, which turns the count n into 63 - n, the
// bitwise inverse of n in six bits.
//
// The chip is purely combinational: no clock, no reset, no storage. It is wave
// pipelined by whatever drives and samples it. An external source applies a new
// pin vector every t_cp, shorter than the propagation delay; with GATE_DELAY > 0
// a vector's count appears on d exactly core_depth(63) * GATE_DELAY (20 cell
// delays) after it was applied, and stays for one t_cp.
//
// Following the source: 63 logic inputs, 16 input pins with shared wiring,
// 6 outputs, no storage elements. This design's choice: which inputs share a
// pin, and the pin numbering. Pad buffers, bias and reference generators are
// analog and are not part of this description.
module popcount_chip
  import popcount_pkg::*;
#(
  parameter int unsigned N_PINS     = 16,
  parameter int unsigned N_IN       = 63,
  parameter int unsigned GATE_DELAY = 0,
  parameter bit          ROUGH_TUNE = 1'b1,
  localparam int unsigned W         = $clog2(N_IN + 1)
) (
  input  logic [N_PINS-1:0] b,
  output logic [W-1:0]      d
);

  logic [N_IN-1:0] x;

  for (genvar i = 0; i < N_IN; i++) begin : g_pin
    assign x[i] = b[i % N_PINS];
  end

  popcount_core #(.N_IN(N_IN), .GATE_DELAY(GATE_DELAY), .ROUGH_TUNE(ROUGH_TUNE)) u_core (
    .x, .count(d)
  );

endmodule
