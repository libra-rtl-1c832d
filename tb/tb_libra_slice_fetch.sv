// Self-checking test of libra_slice_fetch.
//
// A memory model answers line requests after a fixed latency
// (so timing comparisons are exact) and takes one request at a time.
// For random slices, every offset of the slice is fetched in turn; the test
// checks that the word delivered is the one stored at pc, that the line
// requests are exactly the lines covering the slice in ascending order,
// and that the request trace and the number of cycles are the same for all
// offsets of a slice (the offset does not show at the memory). A flush in
// the middle of a fetch must produce no instruction and leave the unit idle.
module tb_libra_slice_fetch;
  import libra_pkg::*;

  localparam int LINE_BYTES = 32;
  localparam int LB = $clog2(LINE_BYTES);
  localparam int MEM_LAT = 3;

  logic clk = 0, rst_n = 0;
  logic start, flush, idle, inst_valid, req_valid, req_ready, resp_valid;
  logic [31:0] pc, inst, inst_pc, req_addr;
  logic [8*LINE_BYTES-1:0] resp_data;
  libra_ctx_t ctx;
  int checks = 0, failures = 0;

  libra_slice_fetch dut (.*);

  always #5 clk = ~clk;

  // memory: word at byte address a holds a ^ 32'h5A5A0000 (recomputed, no array)
  function automatic logic [31:0] mem_word(logic [31:0] a);
    return {a[31:2], 2'b00} ^ 32'h5A5A_0000;
  endfunction

  int          lat_cnt;
  logic [31:0] pend_addr;
  bit          busy;
  logic [31:0] trace[$];

  assign req_ready = !busy;

  always_ff @(posedge clk) begin
    resp_valid <= 1'b0;
    if (!rst_n) begin
      busy <= 0;
    end else if (!busy && req_valid && req_ready) begin
      busy      <= 1;
      pend_addr <= req_addr;
      lat_cnt   <= MEM_LAT;
      trace.push_back(req_addr);
    end else if (busy) begin
      if (lat_cnt == 1) begin
        busy       <= 0;
        resp_valid <= 1'b1;
        for (int w = 0; w < LINE_BYTES / 4; w++)
          resp_data[32*w +: 32] <= mem_word(pend_addr + 32'(4 * w));
      end
      lat_cnt <= lat_cnt - 1;
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // fetch pc in ctx; returns cycles and the request trace
  task automatic fetch(logic [31:0] p, libra_ctx_t c, output int cyc);
    trace.delete();
    @(negedge clk);
    pc = p; ctx = c; start = 1;
    cyc = 0;
    @(negedge clk); start = 0;
    while (!inst_valid) begin @(negedge clk); cyc++; end
    chk(inst == mem_word(p) && inst_pc == p, "fetched word");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc0, cyc;
    logic [31:0] trace0[$];
    start = 0; flush = 0; pc = 0; ctx = CTX_INIT; resp_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      int b;
      logic [31:0] sa, first, last;
      libra_ctx_t c;
      b  = 1 + $urandom % 16;
      sa = ({$urandom} % 32'h1000) & ~32'h3;
      first = sa >> LB; last = (sa + 4 * b - 4) >> LB;
      for (int o = 0; o < b; o++) begin
        c.bbc = BBC_W'(b); c.off = OFF_W'(o); c.rem = '0;
        fetch(sa + 4 * o, c, cyc);
        // the lines covering the slice, ascending, nothing else
        chk(trace.size() == int'(last - first + 1), "number of lines");
        foreach (trace[k])
          chk(trace[k] == (first + k) << LB, "line order");
        if (o == 0) begin trace0 = trace; cyc0 = cyc; end
        else begin
          chk(trace == trace0, "trace independent of offset");
          chk(cyc == cyc0, "cycles independent of offset");
        end
      end
    end
    // flush during a multi-line fetch
    begin
      libra_ctx_t c;
      c.bbc = 16; c.off = 5; c.rem = 0;
      @(negedge clk); pc = 32'h11C + 20; ctx = c; start = 1;
      @(negedge clk); start = 0;
      repeat (5) @(negedge clk);
      flush = 1;
      @(negedge clk); flush = 0;
      for (int k = 0; k < 20; k++) begin
        chk(!inst_valid, "no instruction after flush");
        @(negedge clk);
      end
      chk(idle, "idle after flush");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
