// counter_3_2: 3-2 counter (full adder), the building block of the carry-save
// adder tree.
//
// Adds three bits of equal weight into a sum bit of the same weight and a carry
// bit of twice the weight: s = a ^ b ^ c, co = majority(a, b, c). Both outputs
// come from two levels of OR/NOR cells (cml_xor3 and cml_maj3, nine cells in
// all), so sum and carry leave the counter at the same time and the tree stays
// balanced. Inputs and outputs are dual-rail. Tying one input to RAIL0 gives a
// half adder.
//
// Following the source: the tree is made of 3-2 counters and all cells are
// OR/NOR gates. This design's choice: the two-level sum-of-products netlist.
module counter_3_2
  import popcount_pkg::*;
#(
  parameter int unsigned GATE_DELAY = 0
) (
  input  rail_t a,
  input  rail_t b,
  input  rail_t c,
  output rail_t s,
  output rail_t co
);

  cml_xor3 #(.GATE_DELAY(GATE_DELAY)) u_sum   (.a, .b, .c, .y(s));
  cml_maj3 #(.GATE_DELAY(GATE_DELAY)) u_carry (.a, .b, .c, .y(co));

endmodule
