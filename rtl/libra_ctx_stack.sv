// Two-level hardware stack of Libra contexts.
//
// Holds the current context (bbc, off, rem) and the caller's context. A call
// pushes: the caller's context (as it stands after the call instruction)
// moves to the second level and the callee's context becomes current. A
// return pops: the saved context becomes current again and the second level
// falls back to the initial context (1, 0). Only two levels exist in
// hardware, as in the prototype; deeper nesting relies on software saving
// the second level, for which this design offers a register-style access
// port (prev_we / prev_wdata) and reports when a push overwrites a saved
// context that was still live (ovf).
//
// Timing: all updates take effect at the next rising clock edge. When
// several requests coincide, pop/push take precedence over a plain set, and
// a software write of the saved level takes precedence over the implicit
// reset of that level on a pop. Reset (rst_n low, synchronous) puts both
// levels at (1, 0).
module libra_ctx_stack
  import libra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // replace the current context (level-offset branch, slice exit, ...)
  input  logic       set,
  input  libra_ctx_t set_ctx,
  // call: save push_save as the caller's context, make set_ctx current
  input  logic       push,
  input  libra_ctx_t push_save,
  // return: restore the caller's context
  input  logic       pop,
  // software access to the saved level
  input  logic       prev_we,
  input  libra_ctx_t prev_wdata,
  output libra_ctx_t cur,
  output libra_ctx_t prev,
  output logic       prev_live,  // the saved level holds a caller context
  output logic       ovf         // pulse: a push discarded a live context
);

  libra_ctx_t cur_q, prev_q;
  logic       live_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur_q  <= CTX_INIT;
      prev_q <= CTX_INIT;
      live_q <= 1'b0;
      ovf    <= 1'b0;
    end else begin
      ovf <= push && live_q;
      if (push) begin
        prev_q <= push_save;
        cur_q  <= set_ctx;
        live_q <= 1'b1;
      end else if (pop) begin
        cur_q  <= prev_q;
        prev_q <= CTX_INIT;
        live_q <= 1'b0;
      end else if (set) begin
        cur_q <= set_ctx;
      end
      if (prev_we && !push) begin
        prev_q <= prev_wdata;
        live_q <= 1'b1;
      end
    end
  end

  assign cur       = cur_q;
  assign prev      = prev_q;
  assign prev_live = live_q;

  // a push and a pop in the same cycle have no meaning
  assert property (@(posedge clk) disable iff (!rst_n) !(push && pop));

endmodule
