// tb_csa_tree: checks that the two numbers left by the carry-save tree add up
// to the number of ones among the 63 inputs (never more than 63, so no bit is
// lost), for edge and random vectors, on the ideal tree; and, on a timed tree,
// that no output bit of either row changes except exactly 2 * 7 cell delays
// after an input change (every path padded to the same depth).
module tb_csa_tree;
  import popcount_pkg::*;
  localparam int unsigned N_IN  = 63;
  localparam int unsigned W     = $clog2(N_IN + 1);
  localparam int unsigned D     = 20;
  localparam int unsigned DEPTH = 2 * tree_stages(N_IN, W);
  localparam int unsigned T     = (DEPTH + 3) * D;

  rail_t [N_IN-1:0] x;
  rail_t [W-1:0]    ra, rb, ra_t, rb_t;
  logic  [2*W-1:0]  mon;
  int unsigned checks = 0, failures = 0, changes = 0;
  time t_apply;

  csa_tree #(.N_IN(N_IN))                 dut   (.x, .row_a(ra),   .row_b(rb));
  csa_tree #(.N_IN(N_IN), .GATE_DELAY(D)) dut_t (.x, .row_a(ra_t), .row_b(rb_t));

  function automatic logic [W-1:0] val(rail_t [W-1:0] r);
    logic [W-1:0] v;
    for (int i = 0; i < W; i++) v[i] = r[i].t;
    return v;
  endfunction

  function automatic logic rails_ok(rail_t [W-1:0] r);
    for (int i = 0; i < W; i++) if (r[i].t == r[i].f) return 1'b0;
    return 1'b1;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic apply(logic [N_IN-1:0] v, bit timed);
    int unsigned n = 0;
    for (int i = 0; i < N_IN; i++) begin
      x[i] = '{t: v[i], f: ~v[i]};
      n += v[i];
    end
    t_apply = $time;
    if (timed) #T; else #1;
    if (timed) begin
      check("timed rows sum to the count", 32'(val(ra_t)) + 32'(val(rb_t)) == n);
    end else begin
      check("rows sum to the count", 32'(val(ra)) + 32'(val(rb)) == n);
      check("rails complementary", rails_ok(ra) && rails_ok(rb));
    end
  endtask

  assign mon = {val(ra_t), val(rb_t)};
  always @(mon) begin
    if ($time > T) begin
      changes++;
      check("row bit changes only at apply + tree depth", $time == t_apply + DEPTH * D);
    end
  end

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N_IN-1:0] v;
    t_apply = 0;
    check("seven stages", tree_stages(N_IN, W) == 7);
    apply('0, 0);
    apply('1, 0);
    for (int i = 0; i < N_IN; i++) apply(N_IN'(1) << i, 0);
    for (int n = 0; n < 5000; n++) begin
      int unsigned density = $urandom_range(0, 16);
      for (int i = 0; i < N_IN; i++) v[i] = ($urandom_range(0, 15) < density);
      apply(v, 0);
    end
    apply('0, 1);
    #T;
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < N_IN; i++) v[i] = 1'($urandom);
      apply(v, 1);
    end
    check("timed rows changed", changes > 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
