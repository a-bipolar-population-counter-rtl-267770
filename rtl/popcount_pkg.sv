// popcount_pkg: types and elaboration-time helpers shared by the wave-pipelined
// population counter.
//
// Every logic signal inside the counter is carried dual-rail (rail_t): the true
// value and its complement. A CML OR/NOR cell produces both for free, and having
// both polarities of every signal lets any AND term be formed as a NOR of
// complemented literals, so every function in the design is built from OR/NOR
// cells only, as on the original chip.
//
// The tree_* functions describe the carry-save adder tree shape for a given
// number of inputs. They are evaluated at elaboration time and drive the
// generate loops of csa_tree; a testbench may use them to know the logic depth.
// The shape rule (this design's choice): at each stage, a column holding more
// than two bits is cut into groups of three, each feeding a 3-2 counter; a
// leftover pair feeds a 3-2 counter with its third input tied to 0; a leftover
// single bit passes through. Columns with at most two bits pass unchanged. The
// tree ends when no column holds more than two bits. For 63 inputs this gives
// 7 stages and 59 counters.
package popcount_pkg;

  typedef struct packed {
    logic t;  // true rail
    logic f;  // complement rail
  } rail_t;

  localparam rail_t RAIL0 = '{t: 1'b0, f: 1'b1};

  // Upper bound on the result width handled by the shape functions.
  localparam int unsigned MAXW = 16;

  // Cell levels of the carry-lookahead adder: generate/propagate, lookahead
  // products, carry OR, then two levels of sum parity.
  localparam int unsigned CLA_LEVELS = 5;

  // 3-2 counters in a column holding n bits.
  function automatic int unsigned col_counters(int unsigned n);
    if (n <= 2) return 0;
    return n / 3 + ((n % 3 == 2) ? 1 : 0);
  endfunction

  // 1 if the last counter of the column has a tied-off third input.
  function automatic int unsigned col_half(int unsigned n);
    return (n > 2 && n % 3 == 2) ? 1 : 0;
  endfunction

  // Bits of a column that pass a stage without a counter.
  function automatic int unsigned col_pass(int unsigned n);
    if (n <= 2) return n;
    return (n % 3 == 1) ? 1 : 0;
  endfunction

  // Bits in column col after `stage` reduction stages.
  function automatic int unsigned tree_count(int unsigned n_in, int unsigned w,
                                             int unsigned stage, int unsigned col);
    int unsigned cur[MAXW];
    int unsigned nxt[MAXW];
    for (int unsigned c = 0; c < MAXW; c++) cur[c] = 0;
    cur[0] = n_in;
    for (int unsigned s = 0; s < stage; s++) begin
      for (int unsigned c = 0; c < MAXW; c++) nxt[c] = 0;
      for (int unsigned c = 0; c < w; c++) begin
        nxt[c] += col_counters(cur[c]) + col_pass(cur[c]);
        if (c + 1 < w) nxt[c+1] += col_counters(cur[c]);
      end
      for (int unsigned c = 0; c < MAXW; c++) cur[c] = nxt[c];
    end
    return cur[col];
  endfunction

  // Number of reduction stages until every column holds at most two bits.
  function automatic int unsigned tree_stages(int unsigned n_in, int unsigned w);
    int unsigned s;
    bit busy;
    s = 0;
    busy = 1'b1;
    while (busy) begin
      busy = 1'b0;
      for (int unsigned c = 0; c < w; c++)
        if (tree_count(n_in, w, s, c) > 2) busy = 1'b1;
      if (busy) s++;
    end
    return s;
  endfunction

  // Flat index of the first bit of column col at stage `stage`: bits are
  // numbered stage by stage, and within a stage column by column.
  function automatic int unsigned tree_offset(int unsigned n_in, int unsigned w,
                                              int unsigned stage, int unsigned col);
    int unsigned off;
    off = 0;
    for (int unsigned s = 0; s < stage; s++)
      for (int unsigned c = 0; c < w; c++) off += tree_count(n_in, w, s, c);
    for (int unsigned c = 0; c < col; c++) off += tree_count(n_in, w, stage, c);
    return off;
  endfunction

  // Total 3-2 counters in the tree.
  function automatic int unsigned tree_counters(int unsigned n_in, int unsigned w);
    int unsigned k;
    k = 0;
    for (int unsigned s = 0; s < tree_stages(n_in, w); s++)
      for (int unsigned c = 0; c < w; c++) k += col_counters(tree_count(n_in, w, s, c));
    return k;
  endfunction

  // Cell levels from a core input to a count output: input rank, two levels
  // per tree stage, then the adder.
  function automatic int unsigned core_depth(int unsigned n_in);
    return 1 + 2 * tree_stages(n_in, $clog2(n_in + 1)) + CLA_LEVELS;
  endfunction

endpackage
