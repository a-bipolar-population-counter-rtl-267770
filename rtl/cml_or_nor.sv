// cml_or_nor: the one logic cell of the design, a single-level current-mode-logic
// OR/NOR gate.
//
// In the bipolar original, the inputs drive a row of parallel transistors that
// steer a tail current against a reference transistor; the two collector
// resistors give the OR output and its complement at once. Here the cell is its
// logic function: y = OR of all inputs, y_n = NOR of all inputs. With N = 1 it
// is a noninverting buffer that also supplies the complement; that is how the
// input rank and the rough-tuning delay buffers are made.
//
// GATE_DELAY is the cell's propagation delay in simulator time units. It is 0 by
// default (ideal, synthesizable logic). A testbench sets it above 0 to watch
// several data waves travel through the balanced logic at once; the delay then
// stands for the value that fine tuning sets through each cell's resistors. Both
// outputs switch together, GATE_DELAY after the inputs.
//
// Following the source: the cell type and its two outputs. This design's choice:
// fan-in is a parameter (2 in the source's drawing; up to 5 is used here) and
// all cells share one delay.
module cml_or_nor #(
  parameter int unsigned N          = 2,
  parameter int unsigned GATE_DELAY = 0
) (
  input  logic [N-1:0] a,
  output logic         y,
  output logic         y_n
);

  if (GATE_DELAY == 0) begin : g_ideal
    assign y = |a;
  end else begin : g_timed
    assign #(GATE_DELAY) y = |a;
  end

  assign y_n = ~y;

endmodule
