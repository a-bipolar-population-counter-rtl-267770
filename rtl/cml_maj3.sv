// cml_maj3: three-input majority (the carry of a 3-2 counter) from OR/NOR cells
// in two levels.
//
// Level 1 forms the pair products ab, bc, ac, each as a two-input NOR of the
// complement rails. Level 2 ORs them; its OR/NOR outputs are the true and
// complement rails of the carry. Four cells, output valid two cell delays after
// the last input change, in step with cml_xor3.
module cml_maj3
  import popcount_pkg::*;
#(
  parameter int unsigned GATE_DELAY = 0
) (
  input  rail_t a,
  input  rail_t b,
  input  rail_t c,
  output rail_t y
);

  logic [2:0] p;   // products: ab, bc, ac
  logic [2:0] p_n;
  logic       yt, yf;

  cml_or_nor #(.N(2), .GATE_DELAY(GATE_DELAY)) u_ab (.a({a.f, b.f}), .y(p_n[0]), .y_n(p[0]));
  cml_or_nor #(.N(2), .GATE_DELAY(GATE_DELAY)) u_bc (.a({b.f, c.f}), .y(p_n[1]), .y_n(p[1]));
  cml_or_nor #(.N(2), .GATE_DELAY(GATE_DELAY)) u_ac (.a({a.f, c.f}), .y(p_n[2]), .y_n(p[2]));

  cml_or_nor #(.N(3), .GATE_DELAY(GATE_DELAY)) u_or (.a(p), .y(yt), .y_n(yf));

  assign y = '{t: yt, f: yf};

endmodule
