// Self-checking test of libra_ctx_stack.
//
// Drives random sequences of set, push (call), pop (return) and software
// writes of the saved level, and compares the current and saved contexts,
// the live flag and the overflow pulse with a two-entry reference model
// kept in the testbench, cycle by cycle.
module tb_libra_ctx_stack;
  import libra_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       set, push, pop, prev_we;
  libra_ctx_t set_ctx, push_save, prev_wdata, cur, prev;
  logic       prev_live, ovf;
  int         checks = 0, failures = 0;
  int         n_push = 0, n_pop = 0, n_ovf = 0;

  libra_ctx_stack dut (.*);

  always #5 clk = ~clk;

  libra_ctx_t m_cur, m_prev;
  bit         m_live, m_ovf;

  function automatic libra_ctx_t rnd_ctx();
    libra_ctx_t c;
    c.bbc = BBC_W'(1 + ($urandom % 16));
    c.off = OFF_W'($urandom % c.bbc);
    c.rem = REM_W'($urandom % 9);
    return c;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {set, push, pop, prev_we} = '0;
    set_ctx = CTX_INIT; push_save = CTX_INIT; prev_wdata = CTX_INIT;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    m_cur = CTX_INIT; m_prev = CTX_INIT; m_live = 0; m_ovf = 0;
    @(negedge clk);
    checks++;
    if (cur != CTX_INIT || prev != CTX_INIT || prev_live) begin
      failures++; $display("FAIL reset value");
    end
    for (int i = 0; i < 3000; i++) begin
      int op;
      op = $urandom % 4;
      set = (op == 0); push = (op == 1); pop = (op == 2);
      prev_we = ($urandom % 8) == 0;
      set_ctx = rnd_ctx(); push_save = rnd_ctx(); prev_wdata = rnd_ctx();
      @(posedge clk);
      // reference model
      m_ovf = push && m_live;
      if (push) begin m_prev = push_save; m_cur = set_ctx; m_live = 1; n_push++; end
      else if (pop) begin m_cur = m_prev; m_prev = CTX_INIT; m_live = 0; n_pop++; end
      else if (set) m_cur = set_ctx;
      if (prev_we && !push) begin m_prev = prev_wdata; m_live = 1; end
      if (m_ovf) n_ovf++;
      @(negedge clk);
      checks++;
      if (cur !== m_cur || prev !== m_prev || prev_live !== m_live || ovf !== m_ovf) begin
        failures++;
        $display("FAIL step %0d op=%0d cur=%h/%h prev=%h/%h live=%b/%b ovf=%b/%b",
                 i, op, cur, m_cur, prev, m_prev, prev_live, m_live, ovf, m_ovf);
      end
    end
    checks++;
    if (n_push == 0 || n_pop == 0 || n_ovf == 0) begin
      failures++; $display("FAIL some operation never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
