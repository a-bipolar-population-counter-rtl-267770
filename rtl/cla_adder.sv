// cla_adder: W-bit carry-propagate adder with full carry lookahead, built from
// OR/NOR cells. It adds the two numbers left by the carry-save tree.
//
// Level 1: generate g_i = a_i AND b_i (a NOR of the complement rails) and
//          propagate p_i = a_i OR b_i.
// Level 2: lookahead products g_j AND p_(j+1) AND ... AND p_(i-1) for every
//          j < i, each a NOR of complemented g/p.
// Level 3: carry c_i = OR of the products for bit i. Every carry is ready after
//          three levels whatever its position; there is no ripple.
// Levels 4-5: s_i = a_i ^ b_i ^ c_i (cml_xor3). The operand bits reach the sum
//          through three delay buffers (rough tuning), so every input-to-output
//          path is exactly CLA_LEVELS = 5 cells deep.
//
// There is no carry in and no carry out: the result is the sum modulo 2^W. In
// the counter the sum never exceeds 2^W - 1, so nothing is lost. Inputs and
// outputs are dual-rail; the block is combinational with a latency of five cell
// delays.
//
// Following the source: a 6-bit carry-propagate adder using basic carry
// lookahead. This design's choice: single-level full lookahead (fan-in up to W-1
// per cell), OR-type propagate, and the padding of the operand bits.
module cla_adder
  import popcount_pkg::*;
#(
  parameter int unsigned W          = 6,
  parameter int unsigned GATE_DELAY = 0,
  parameter bit          ROUGH_TUNE = 1'b1
) (
  input  rail_t [W-1:0] a,
  input  rail_t [W-1:0] b,
  output rail_t [W-1:0] s
);

  logic  [W-1:0] g_n;   // complement of generate, bits 0..W-2 used
  logic  [W-1:0] p_n;   // complement of propagate, bits 1..W-2 used
  rail_t [W-1:0] c;     // carry into each bit

  // Level 1: generate and propagate for the bits whose carry is used.
  for (genvar i = 0; i < W; i++) begin : g_gp
    if (i < W - 1) begin : g_g
      logic g;
      cml_or_nor #(.N(2), .GATE_DELAY(GATE_DELAY)) u_g (
        .a({a[i].f, b[i].f}), .y(g_n[i]), .y_n(g)
      );
    end else begin : g_g_none
      assign g_n[i] = 1'b1;
    end
    if (i >= 1 && i < W - 1) begin : g_p
      logic p;
      cml_or_nor #(.N(2), .GATE_DELAY(GATE_DELAY)) u_p (
        .a({a[i].t, b[i].t}), .y(p), .y_n(p_n[i])
      );
    end else begin : g_p_none
      assign p_n[i] = 1'b1;
    end
  end

  // Levels 2 and 3: lookahead carries.
  assign c[0] = RAIL0;
  for (genvar i = 1; i < W; i++) begin : g_carry
    logic [i-1:0] term;
    for (genvar j = 0; j < i; j++) begin : g_term
      logic [i-j-1:0] lit;          // complemented literals of the product
      logic           term_n;
      assign lit[0] = g_n[j];
      for (genvar k = 1; k < i - j; k++) begin : g_lit
        assign lit[k] = p_n[j+k];
      end
      cml_or_nor #(.N(i - j), .GATE_DELAY(GATE_DELAY)) u_term (
        .a(lit), .y(term_n), .y_n(term[j])
      );
    end
    logic ct, cf;
    cml_or_nor #(.N(i), .GATE_DELAY(GATE_DELAY)) u_or (
      .a(term), .y(ct), .y_n(cf)
    );
    assign c[i] = '{t: ct, f: cf};
  end

  // Levels 4 and 5: sum bits, operands padded to meet the carries.
  for (genvar i = 0; i < W; i++) begin : g_sum
    rail_t a_d, b_d;
    delay_chain #(.STAGES(ROUGH_TUNE ? 3 : 0), .GATE_DELAY(GATE_DELAY)) u_pad_a (.a(a[i]), .y(a_d));
    delay_chain #(.STAGES(ROUGH_TUNE ? 3 : 0), .GATE_DELAY(GATE_DELAY)) u_pad_b (.a(b[i]), .y(b_d));
    cml_xor3 #(.GATE_DELAY(GATE_DELAY)) u_xor (.a(a_d), .b(b_d), .c(c[i]), .y(s[i]));
  end

endmodule
