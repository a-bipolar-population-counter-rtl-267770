// popcount_core: wave-pipelinable population counter. count is the number of
// ones in the N_IN-bit input x (63 inputs, 6-bit count by default).
//
// Three sections, all combinational and built only from OR/NOR cells:
//   1. input rank: one one-input cml_or_nor per input, giving each bit both
//      polarities (the dual-rail form every later cell needs);
//   2. csa_tree: 3-2 counters reduce the bits to two W-bit numbers;
//   3. cla_adder: carry-lookahead addition of the two numbers.
// There are no storage elements. Every input-to-output path crosses the same
// number of cells, core_depth(N_IN) = 1 + 2*7 + 5 = 20 for 63 inputs, because
// short paths are padded (ROUGH_TUNE = 1). With GATE_DELAY > 0 the latency is
// core_depth * GATE_DELAY, and a new input vector may be applied every few cell
// delays, well before the previous one has reached the outputs: each vector
// travels through the logic as its own wave.
//
// Following the source: the tree-plus-adder split, 3-2 counters, carry
// lookahead, OR/NOR cells only. This design's choice: the dual-rail netlist,
// its depth (20 levels here against the source's 21), and the padding.
module popcount_core
  import popcount_pkg::*;
#(
  parameter int unsigned N_IN       = 63,
  parameter int unsigned GATE_DELAY = 0,
  parameter bit          ROUGH_TUNE = 1'b1,
  localparam int unsigned W         = $clog2(N_IN + 1)
) (
  input  logic [N_IN-1:0] x,
  output logic [W-1:0]    count
);

  rail_t [N_IN-1:0] x_r;
  rail_t [W-1:0]    row_a, row_b, sum;

  for (genvar i = 0; i < N_IN; i++) begin : g_rank
    logic yt, yf;
    cml_or_nor #(.N(1), .GATE_DELAY(GATE_DELAY)) u_in (.a(x[i]), .y(yt), .y_n(yf));
    assign x_r[i] = '{t: yt, f: yf};
  end

  csa_tree #(.N_IN(N_IN), .GATE_DELAY(GATE_DELAY), .ROUGH_TUNE(ROUGH_TUNE)) u_tree (
    .x(x_r), .row_a, .row_b
  );

  cla_adder #(.W(W), .GATE_DELAY(GATE_DELAY), .ROUGH_TUNE(ROUGH_TUNE)) u_add (
    .a(row_a), .b(row_b), .s(sum)
  );

  for (genvar i = 0; i < W; i++) begin : g_out
    assign count[i] = sum[i].t;
  end

endmodule
