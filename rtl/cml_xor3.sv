// cml_xor3: three-input parity from OR/NOR cells in two levels.
//
// Level 1 forms the four odd-parity minterms, each as a three-input NOR of the
// complemented literals (a'b'c = NOR(a, b, c') and so on). Level 2 ORs the
// minterms; its OR/NOR outputs are the true and complement rails of the parity.
// Used for the sum of a 3-2 counter and for the sum bits of the lookahead adder.
// Five cells, output valid two cell delays after the last input change.
module cml_xor3
  import popcount_pkg::*;
#(
  parameter int unsigned GATE_DELAY = 0
) (
  input  rail_t a,
  input  rail_t b,
  input  rail_t c,
  output rail_t y
);

  logic [3:0] m;   // minterms: a'b'c, a'bc', ab'c', abc
  logic [3:0] m_n;
  logic       yt, yf;

  cml_or_nor #(.N(3), .GATE_DELAY(GATE_DELAY)) u_m0 (.a({a.t, b.t, c.f}), .y(m_n[0]), .y_n(m[0]));
  cml_or_nor #(.N(3), .GATE_DELAY(GATE_DELAY)) u_m1 (.a({a.t, b.f, c.t}), .y(m_n[1]), .y_n(m[1]));
  cml_or_nor #(.N(3), .GATE_DELAY(GATE_DELAY)) u_m2 (.a({a.f, b.t, c.t}), .y(m_n[2]), .y_n(m[2]));
  cml_or_nor #(.N(3), .GATE_DELAY(GATE_DELAY)) u_m3 (.a({a.f, b.f, c.f}), .y(m_n[3]), .y_n(m[3]));

  cml_or_nor #(.N(4), .GATE_DELAY(GATE_DELAY)) u_or (.a(m), .y(yt), .y_n(yf));

  assign y = '{t: yt, f: yf};

endmodule
