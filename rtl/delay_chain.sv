// delay_chain: the noninverting delay element that rough tuning inserts to pad
// out short paths.
//
// A dual-rail signal passes through STAGES one-input OR/NOR cells in series, so
// it arrives exactly STAGES cell delays later, the same as if it had gone
// through that many levels of logic. Logically the output equals the input; the
// element matters only for timing (GATE_DELAY > 0), where it keeps every path of
// the counter at the same depth so that successive data waves do not overtake
// each other. STAGES = 0 gives a plain connection (the untuned circuit).
//
// Following the source: active noninverting buffers as delay elements. This
// design's choice: each buffer is an ordinary logic cell, so its delay equals a
// logic level.
module delay_chain
  import popcount_pkg::*;
#(
  parameter int unsigned STAGES     = 1,
  parameter int unsigned GATE_DELAY = 0
) (
  input  rail_t a,
  output rail_t y
);

  if (STAGES == 0) begin : g_wire
    assign y = a;
  end else begin : g_chain
    logic [STAGES:0] t;
    assign t[0] = a.t;
    for (genvar i = 0; i < STAGES; i++) begin : g_buf
      logic yt, yf;
      cml_or_nor #(.N(1), .GATE_DELAY(GATE_DELAY)) u_buf (
        .a(t[i]), .y(yt), .y_n(yf)
      );
      assign t[i+1] = yt;
      if (i == STAGES - 1) begin : g_last
        assign y = '{t: yt, f: yf};
      end
    end
  end

endmodule
