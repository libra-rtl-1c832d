// Libra-aware instruction fetch unit (design top).
//
// Lets a core execute folded code regions, in which the basic blocks of each
// level of a secret-dependent region are interleaved slice by slice, without
// the instruction fetch path revealing which side of a secret branch runs.
// It ties together:
//   libra_slice_fetch - fetches every line of the current slice in a fixed
//                       order, whatever the level offset,
//   libra_decoder     - recognises lo.br, tlo.br, lo.call and ordinary
//                       control flow,
//   libra_next_pc     - the Libra PC and context update rules,
//   libra_ctx_stack   - current and caller Libra contexts.
//
// Control flow handling:
//   * Outside folded code (context (1, 0)) an ordinary conditional branch is
//     predicted by the external branch predictor and fetch continues along
//     the predicted path; a wrong prediction drops what was fetched
//     (fe_flush) and refetches. Only one branch is in flight: the first
//     instruction on the predicted path is fetched but held until the branch
//     resolves.
//   * Inside folded code the predictor is neither looked up nor trained,
//     and every conditional branch, and every lo.br / tlo.br anywhere, stops
//     fetch until the back end reports its condition. This stall is the one
//     the prototype also has; the next slice is the same whatever the
//     outcome, so only the offset within it waits for the condition.
//   * Indirect jumps (jalr, including returns) also wait for their target.
//   * Direct jumps, calls and lo.call are followed at once.
//   * A trap (trap_valid) abandons everything in flight, saves the context
//     the interrupted code must resume in (trap_ctx, supplied by the back
//     end together with the resume PC it keeps itself) on the context stack
//     and starts the handler at trap_pc in context (1, 0). mret waits for
//     the back end to supply the resume PC and restores the saved context.
//     The two-level stack is what makes traps inside folded code possible;
//     a handler that calls functions must spill the saved level first.
//
// Back-end interface: instructions leave on a valid/ready channel with their
// PC, the Libra context they execute in and the link value a call writes to
// rd (the fall-through address in the caller's level, not pc + 4). For each
// conditional branch, lo.br, tlo.br, jalr and mret that it accepts the back end
// must later pulse res_valid with the condition (res_taken) or the target
// (res_target), in order; no instruction is offered in between. The saved
// (caller) context is readable and writable for software (csr_*), so that
// non-leaf functions can spill it.
//
// The predictor interface, the speculation policy and the back-end
// handshake are this design's own choices: the core these additions were
// built into is not described in enough detail to copy them.
module libra_frontend
  import libra_pkg::*;
#(
  parameter int unsigned   LINE_BYTES = 32,
  parameter logic [31:0]   RESET_PC   = 32'h0000_0000
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // instruction cache
  output logic                     ic_req_valid,
  output logic [XLEN-1:0]          ic_req_addr,
  input  logic                     ic_req_ready,
  input  logic                     ic_resp_valid,
  input  logic [8*LINE_BYTES-1:0]  ic_resp_data,
  // branch direction predictor (lookup is answered in the same cycle)
  output logic                     bp_lookup_valid,
  output logic [XLEN-1:0]          bp_lookup_pc,
  input  logic                     bp_pred_taken,
  output logic                     bp_upd_valid,
  output logic [XLEN-1:0]          bp_upd_pc,
  output logic                     bp_upd_taken,
  // instructions to the back end
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [XLEN-1:0]          out_pc,
  output logic [31:0]              out_inst,
  output logic [XLEN-1:0]          out_link,
  output libra_ctx_t               out_ctx,
  output logic                     out_illegal,
  // resolution from the back end
  input  logic                     res_valid,
  input  logic                     res_taken,
  input  logic [XLEN-1:0]          res_target,
  // trap entry from the back end (exception or interrupt)
  input  logic                     trap_valid,
  input  logic [XLEN-1:0]          trap_pc,     // handler address
  input  libra_ctx_t               trap_ctx,    // context to resume in
  // software access to the saved Libra context
  input  logic                     csr_prev_we,
  input  libra_ctx_t               csr_prev_wdata,
  output libra_ctx_t               csr_prev_rdata,
  // status
  output logic                     folded,      // current context is not (1, 0)
  output logic                     lobr_stall,  // fetch waits on a lo.br / tlo.br
  output logic                     fe_flush,    // wrong prediction, refetch
  output logic                     csr_prev_live, // the saved level holds a caller context
  output logic                     stack_ovf    // a push discarded a saved context
);

  // ---------------------------------------------------------------- state
  logic [XLEN-1:0] fpc;                          // next fetch address
  logic            buf_valid;
  logic [31:0]     buf_inst;
  logic [XLEN-1:0] buf_pc;
  logic            wait_res;                     // blocking resolution pending
  logic [31:0]     w_inst;
  logic [XLEN-1:0] w_pc;
  logic            pend_valid;                   // predicted branch in flight
  logic            pend_pred;
  logic [XLEN-1:0] pend_pc, pend_tgt, pend_fall;

  libra_ctx_t      cur_ctx, prev_ctx;

  // ------------------------------------------------------ decode / next pc
  logic [31:0]     sel_inst;
  logic [XLEN-1:0] sel_pc;
  dec_t            dec;
  logic            np_taken;
  logic [XLEN-1:0] np_pc, np_link, np_slice, np_next_slice;
  libra_ctx_t      np_ctx, np_save;
  logic            np_set, np_push, np_pop;

  assign sel_inst = wait_res ? w_inst : buf_inst;
  assign sel_pc   = wait_res ? w_pc   : buf_pc;

  libra_decoder u_dec (.inst(sel_inst), .dec(dec));

  assign folded   = (cur_ctx != CTX_INIT);
  assign np_taken = wait_res ? res_taken : bp_pred_taken;

  libra_next_pc u_npc (
    .pc(sel_pc), .ctx(cur_ctx), .dec(dec), .taken(np_taken),
    .jalr_target(res_target),
    .npc(np_pc), .nctx(np_ctx), .set(np_set), .push(np_push),
    .push_save(np_save), .pop(np_pop), .link(np_link),
    .slice_addr(np_slice), .next_slice(np_next_slice)
  );

  // --------------------------------------------------------------- issue
  logic out_fire, issue_simple, issue_pred, issue_wait;
  logic res_wait, res_pend, mispredict;

  assign out_valid   = buf_valid && !wait_res && !pend_valid && !trap_valid;
  assign out_fire    = out_valid && out_ready;
  assign out_pc      = buf_pc;
  assign out_inst    = buf_inst;
  assign out_link    = np_link;
  assign out_ctx     = cur_ctx;
  assign out_illegal = dec.illegal;

  always_comb begin
    issue_simple = 1'b0;
    issue_pred   = 1'b0;
    issue_wait   = 1'b0;
    if (out_fire) begin
      unique case (dec.kind)
        CF_BR:              if (folded) issue_wait = 1'b1; else issue_pred = 1'b1;
        CF_LOBR, CF_TLOBR,
        CF_JALR, CF_XRET:   issue_wait = 1'b1;
        default:            issue_simple = 1'b1;
      endcase
    end
  end

  // the predictor is used only for ordinary branches outside folded code
  assign bp_lookup_valid = issue_pred;
  assign bp_lookup_pc    = buf_pc;

  assign res_wait   = res_valid && wait_res && !trap_valid;
  assign res_pend   = res_valid && pend_valid && !wait_res && !trap_valid;
  assign mispredict = res_pend && (res_taken != pend_pred);
  assign fe_flush   = mispredict;

  assign bp_upd_valid = res_pend;
  assign bp_upd_pc    = pend_pc;
  assign bp_upd_taken = res_taken;

  assign lobr_stall = wait_res && (dec.kind == CF_LOBR || dec.kind == CF_TLOBR);

  // ------------------------------------------------------- context stack
  logic st_set, st_push, st_pop;
  libra_ctx_t st_new, st_save;
  assign st_set  = (issue_simple || res_wait) && np_set;
  assign st_push = ((issue_simple || res_wait) && np_push) || trap_valid;
  assign st_pop  = (issue_simple || res_wait) && np_pop;
  assign st_new  = trap_valid ? CTX_INIT : np_ctx;
  assign st_save = trap_valid ? trap_ctx : np_save;

  libra_ctx_stack u_stack (
    .clk, .rst_n,
    .set(st_set), .set_ctx(st_new),
    .push(st_push), .push_save(st_save),
    .pop(st_pop),
    .prev_we(csr_prev_we), .prev_wdata(csr_prev_wdata),
    .cur(cur_ctx), .prev(prev_ctx), .prev_live(csr_prev_live), .ovf(stack_ovf)
  );
  assign csr_prev_rdata = prev_ctx;

  // --------------------------------------------------------------- fetch
  logic            sf_idle, sf_valid, sf_start;
  logic [31:0]     sf_inst;
  logic [XLEN-1:0] sf_pc;

  logic sf_flush;
  assign sf_flush = mispredict || trap_valid;
  assign sf_start = sf_idle && !sf_valid && !buf_valid && !wait_res && !sf_flush;

  libra_slice_fetch #(.LINE_BYTES(LINE_BYTES)) u_fetch (
    .clk, .rst_n,
    .start(sf_start), .pc(fpc), .ctx(cur_ctx), .flush(sf_flush),
    .idle(sf_idle), .inst_valid(sf_valid), .inst(sf_inst), .inst_pc(sf_pc),
    .req_valid(ic_req_valid), .req_addr(ic_req_addr), .req_ready(ic_req_ready),
    .resp_valid(ic_resp_valid), .resp_data(ic_resp_data)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fpc        <= RESET_PC;
      buf_valid  <= 1'b0;
      buf_inst   <= '0;
      buf_pc     <= '0;
      wait_res   <= 1'b0;
      w_inst     <= '0;
      w_pc       <= '0;
      pend_valid <= 1'b0;
      pend_pred  <= 1'b0;
      pend_pc    <= '0;
      pend_tgt   <= '0;
      pend_fall  <= '0;
    end else begin
      if (sf_valid && !sf_flush) begin
        buf_valid <= 1'b1;
        buf_inst  <= sf_inst;
        buf_pc    <= sf_pc;
      end
      if (out_fire) buf_valid <= 1'b0;

      if (issue_simple) fpc <= np_pc;

      if (issue_pred) begin
        fpc        <= np_pc;          // next_pc was fed the prediction
        pend_valid <= 1'b1;
        pend_pred  <= bp_pred_taken;
        pend_pc    <= buf_pc;
        pend_tgt   <= buf_pc + dec.imm;
        pend_fall  <= buf_pc + (XLEN'(cur_ctx.bbc) << 2);
      end

      if (issue_wait) begin
        wait_res <= 1'b1;
        w_inst   <= buf_inst;
        w_pc     <= buf_pc;
      end

      if (res_wait) begin
        wait_res <= 1'b0;
        fpc      <= np_pc;
      end

      if (res_pend) begin
        pend_valid <= 1'b0;
        if (mispredict) begin
          fpc       <= res_taken ? pend_tgt : pend_fall;
          buf_valid <= 1'b0;
        end
      end

      if (trap_valid) begin
        fpc        <= trap_pc;
        buf_valid  <= 1'b0;
        wait_res   <= 1'b0;
        pend_valid <= 1'b0;
      end
    end
  end

  // a resolution only arrives for an instruction that waits for one
  assert property (@(posedge clk) disable iff (!rst_n)
                   res_valid |-> (wait_res || pend_valid));
  // nothing leaves while a branch is unresolved
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid |-> !(wait_res || pend_valid));

endmodule
