// csa_tree: carry-save adder tree that turns N_IN one-bit inputs into two W-bit
// numbers whose sum is the number of ones, W = $clog2(N_IN + 1).
//
// The tree works column by column (column c holds bits of weight 2^c). At each
// stage a column with more than two bits is cut into groups of three, and each
// group goes to a 3-2 counter whose sum stays in the column and whose carry moves
// to the next column; a leftover pair goes to a 3-2 counter with its third input
// tied to 0, a leftover single bit passes. Columns with at most two bits pass
// unchanged. When no column holds more than two bits, the remaining bits form
// row_a and row_b (missing bits are 0). For 63 inputs: 7 stages, 59 counters.
// The shape is computed by the tree_* functions of popcount_pkg.
//
// Rough tuning: with ROUGH_TUNE = 1 every bit that passes a stage goes through
// a two-cell delay_chain, the depth of a 3-2 counter, so every input-to-output
// path crosses exactly 2 * stages cells. That equal depth is what lets several
// data waves share the tree when GATE_DELAY > 0. With ROUGH_TUNE = 0 the pads
// are plain wires (the untuned circuit).
//
// Carries out of column W-1 are dropped: they would have weight 2^W, which the
// count of N_IN < 2^W ones can never reach, so they are always 0.
//
// Following the source: a carry-save tree of 3-2 counters producing two 6-bit
// numbers, and padding of short paths with buffers. This design's choice: the
// tree shape and the fixed two-cell pads.
module csa_tree
  import popcount_pkg::*;
#(
  parameter int unsigned N_IN       = 63,
  parameter int unsigned GATE_DELAY = 0,
  parameter bit          ROUGH_TUNE = 1'b1,
  localparam int unsigned W         = $clog2(N_IN + 1)
) (
  input  rail_t [N_IN-1:0] x,
  output rail_t [W-1:0]    row_a,
  output rail_t [W-1:0]    row_b
);

  localparam int unsigned STAGES = tree_stages(N_IN, W);

  // Index of column c's first bit within stage s.
  function automatic int unsigned loc(int unsigned s, int unsigned c);
    return tree_offset(N_IN, W, s, c) - tree_offset(N_IN, W, s, 0);
  endfunction

  // Each g_stage[s] holds the bits entering stage s (cur) and the bits it
  // produces (nxt), column by column.
  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int unsigned N_CUR = loc(s, W - 1) + tree_count(N_IN, W, s, W - 1);
    localparam int unsigned N_NXT = loc(s + 1, W - 1) + tree_count(N_IN, W, s + 1, W - 1);
    rail_t cur [N_CUR];
    rail_t nxt [N_NXT];

    if (s == 0) begin : g_first
      for (genvar i = 0; i < N_IN; i++) begin : g_in
        assign cur[i] = x[i];
      end
    end else begin : g_chain
      assign cur = g_stage[s-1].nxt;
    end

    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int unsigned N    = tree_count(N_IN, W, s, c);
      localparam int unsigned K    = col_counters(N);
      localparam int unsigned H    = col_half(N);
      localparam int unsigned P    = col_pass(N);
      localparam int unsigned BASE = loc(s, c);
      localparam int unsigned NEXT = loc(s + 1, c);

      // 3-2 counters; the last one is a half counter when H = 1.
      for (genvar k = 0; k < K; k++) begin : g_ctr
        rail_t cin, sum, carry;
        if (H == 1 && k == K - 1) begin : g_half
          assign cin = RAIL0;
        end else begin : g_full
          assign cin = cur[BASE + 3*k + 2];
        end
        counter_3_2 #(.GATE_DELAY(GATE_DELAY)) u_ctr (
          .a(cur[BASE + 3*k]), .b(cur[BASE + 3*k + 1]), .c(cin),
          .s(sum), .co(carry)
        );
        assign nxt[NEXT + k] = sum;
        if (c + 1 < W) begin : g_carry
          // Carries follow the sums and passing bits of the next column.
          localparam int unsigned NC = tree_count(N_IN, W, s, c + 1);
          assign nxt[loc(s + 1, c + 1) + col_counters(NC) + col_pass(NC) + k] = carry;
        end else begin : g_msb
          // Weight 2^W: always 0 for a valid count, left unconnected.
          rail_t msb_carry;
          assign msb_carry = carry;
        end
      end

      // Passing bits, padded to the depth of a counter.
      for (genvar j = 0; j < P; j++) begin : g_pass
        delay_chain #(.STAGES(ROUGH_TUNE ? 2 : 0), .GATE_DELAY(GATE_DELAY)) u_pad (
          .a(cur[BASE + N - P + j]), .y(nxt[NEXT + K + j])
        );
      end
    end
  end

  // The last stage holds at most two bits per column.
  for (genvar c = 0; c < W; c++) begin : g_out
    localparam int unsigned N    = tree_count(N_IN, W, STAGES, c);
    localparam int unsigned BASE = loc(STAGES, c);
    if (N >= 1) begin : g_a
      assign row_a[c] = g_stage[STAGES-1].nxt[BASE];
    end else begin : g_a0
      assign row_a[c] = RAIL0;
    end
    if (N >= 2) begin : g_b
      assign row_b[c] = g_stage[STAGES-1].nxt[BASE + 1];
    end else begin : g_b0
      assign row_b[c] = RAIL0;
    end
  end

endmodule
