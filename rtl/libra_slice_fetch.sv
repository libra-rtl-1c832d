// Slice-granular instruction fetch sequencer.
//
// Fetches one instruction without revealing its level offset to the
// instruction memory. For a fetch of the word at `pc` in context (bbc, off)
// it requests, one after the other and always in ascending address order,
// every cache line that holds part of the current slice
// [pc - off*4, pc - off*4 + bbc*4), and picks the requested word out of the
// line that contains it. The sequence of line requests therefore depends
// only on the slice address and width, never on the offset, which keeps the
// state of the instruction cache and of any prefetcher that watches it
// independent of which basic block of the slice executes. Outside folded
// code (bbc = 1) this is a single line request.
//
// Memory side: a valid/ready request channel carrying a line-aligned byte
// address, and a response channel that returns a whole line one or more
// cycles later. One request is outstanding at a time.
//
// Control side: `start` (accepted only while `idle`) latches pc and ctx;
// `inst_valid` pulses for one cycle with the word when the last line of the
// slice has returned. `flush` abandons the fetch: a request not yet accepted
// is withdrawn, an accepted one is waited for and its response dropped.
//
// Timing: a slice spanning n lines takes n*(1 + memory latency) cycles or
// more, independent of the offset. The line size is this design's choice.
module libra_slice_fetch
  import libra_pkg::*;
#(
  parameter int unsigned LINE_BYTES = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [XLEN-1:0]           pc,
  input  libra_ctx_t                ctx,
  input  logic                      flush,
  output logic                      idle,
  output logic                      inst_valid,
  output logic [31:0]               inst,
  output logic [XLEN-1:0]           inst_pc,
  // instruction memory / cache
  output logic                      req_valid,
  output logic [XLEN-1:0]           req_addr,
  input  logic                      req_ready,
  input  logic                      resp_valid,
  input  logic [8*LINE_BYTES-1:0]   resp_data
);

  localparam int unsigned LB    = $clog2(LINE_BYTES);
  localparam int unsigned LW    = XLEN - LB;  // line-number width

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_DRAIN} state_e;

  state_e          state;
  logic [LW-1:0]   cur_line, last_line;
  logic [XLEN-1:0] pc_q;
  logic [31:0]     word_q;
  logic [XLEN-1:0] s_first, s_last;

  // first and last byte-aligned word of the slice of the incoming fetch
  assign s_first = pc - (XLEN'(ctx.off) << 2);
  assign s_last  = s_first + (XLEN'(ctx.bbc) << 2) - XLEN'(4);

  assign idle      = (state == S_IDLE);
  assign req_valid = (state == S_REQ) && !flush;
  assign req_addr  = {cur_line, {LB{1'b0}}};

  logic [31:0] resp_word;
  logic        hit_line;
  assign hit_line  = (cur_line == pc_q[XLEN-1:LB]);
  assign resp_word = resp_data[32*pc_q[LB-1:2] +: 32];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      inst_valid <= 1'b0;
      cur_line   <= '0;
      last_line  <= '0;
      pc_q       <= '0;
      word_q     <= '0;
      inst       <= '0;
      inst_pc    <= '0;
    end else begin
      inst_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start && !flush) begin
            pc_q      <= pc;
            cur_line  <= s_first[XLEN-1:LB];
            last_line <= s_last[XLEN-1:LB];
            state     <= S_REQ;
          end
        end
        S_REQ: begin
          if (flush)          state <= S_IDLE;
          else if (req_ready) state <= S_WAIT;
        end
        S_WAIT: begin
          if (flush) begin
            state <= resp_valid ? S_IDLE : S_DRAIN;
          end else if (resp_valid) begin
            if (hit_line) word_q <= resp_word;
            if (cur_line == last_line) begin
              inst       <= hit_line ? resp_word : word_q;
              inst_pc    <= pc_q;
              inst_valid <= 1'b1;
              state      <= S_IDLE;
            end else begin
              cur_line <= cur_line + LW'(1);
              state    <= S_REQ;
            end
          end
        end
        S_DRAIN: begin
          if (resp_valid) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the requested word always lies inside the slice
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_IDLE && start && !flush) |-> ({1'b0, ctx.off} < ctx.bbc));

endmodule
