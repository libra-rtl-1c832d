// Next-PC and next-context logic of Libra.
//
// Purely combinational. Given the PC of an instruction, the Libra context it
// executes in, its decoded control-flow fields and (for branches and
// indirect jumps) its resolved outcome, it computes where execution goes
// next and how the context stack changes. Addresses are in bytes and each
// instruction is 4 bytes, so a distance of n instructions is n*4.
//
//   slice_addr = pc - off*4             start of the current slice
//   next_slice = slice_addr + bbc*4     start of the following slice
//
//   non-control instruction : pc + bbc*4, same context (walk down the level)
//   lo.br / tlo.br          : next_slice + (cond ? off_t : off_f)*4,
//                             context (bbc', chosen offset)
//   lo.call b, l            : l + off'*4 with off' = 0 (real) or 1 (dummy),
//                             context (2, off'), caller context pushed,
//                             link = fall-through address of the call
//   ordinary call (jal/jalr with rd != x0): pushes, callee context (1, 0)
//   ret (jalr x0, 0(x1))    : resolved target, caller context popped
//   mret                    : resolved target (the trap PC), the context
//                             saved on trap entry popped
//
// These follow the Libra semantics. The terminating level of tlo.br is this
// design's reading of the prototype's optimisation: tlo.br also loads rem
// with the number of slices of the next level; each instruction executed
// there counts one slice down, and after the last one execution leaves the
// region at next_slice with the context back at (1, 0), so no closing lo.br
// instructions are needed. Also this design's choice: a taken ordinary
// branch keeps the context unchanged (its target lies at the same offset of
// the target slice), a not-taken one behaves like a non-control instruction.
module libra_next_pc
  import libra_pkg::*;
(
  input  logic [XLEN-1:0] pc,
  input  libra_ctx_t      ctx,
  input  dec_t            dec,
  input  logic            taken,        // branch condition (BR, LOBR, TLOBR)
  input  logic [XLEN-1:0] jalr_target,  // resolved target of a JALR
  output logic [XLEN-1:0] npc,
  output libra_ctx_t      nctx,         // new current context (set or push)
  output logic            set,
  output logic            push,
  output libra_ctx_t      push_save,    // caller context saved on a push
  output logic            pop,
  output logic [XLEN-1:0] link,         // value written to rd by a call
  output logic [XLEN-1:0] slice_addr,
  output logic [XLEN-1:0] next_slice
);

  logic [XLEN-1:0] seq_pc;
  libra_ctx_t      seq_ctx;
  logic [OFF_W-1:0] sel_off;

  assign slice_addr = pc - (XLEN'(ctx.off) << 2);
  assign next_slice = slice_addr + (XLEN'(ctx.bbc) << 2);

  // fall-through of an instruction that does not transfer control
  always_comb begin
    seq_ctx = ctx;
    if (ctx.rem == REM_W'(1)) begin
      seq_pc  = next_slice;       // last slice of a terminating level
      seq_ctx = CTX_INIT;
    end else begin
      seq_pc = pc + (XLEN'(ctx.bbc) << 2);
      if (ctx.rem != '0) seq_ctx.rem = ctx.rem - REM_W'(1);
    end
  end

  assign sel_off = taken ? dec.off_t : dec.off_f;

  always_comb begin
    npc       = seq_pc;
    nctx      = seq_ctx;
    set       = 1'b1;
    push      = 1'b0;
    pop       = 1'b0;
    push_save = seq_ctx;
    link      = seq_pc;
    unique case (dec.kind)
      CF_NONE: ;
      CF_BR: begin
        if (taken) begin
          npc  = pc + dec.imm;
          nctx = ctx;
        end
      end
      CF_LOBR, CF_TLOBR: begin
        npc      = next_slice + (XLEN'(sel_off) << 2);
        nctx.bbc = dec.bbc;
        nctx.off = sel_off;
        nctx.rem = (dec.kind == CF_TLOBR) ? dec.nslices : '0;
      end
      CF_JAL: begin
        npc = pc + dec.imm;
        if (dec.is_call) begin
          push = 1'b1;
          set  = 1'b0;
          nctx = CTX_INIT;
        end else begin
          nctx = ctx;
        end
      end
      CF_LOCALL: begin
        npc      = pc + dec.imm + (XLEN'(dec.call_off) << 2);
        push     = 1'b1;
        set      = 1'b0;
        nctx     = CTX_INIT;
        nctx.bbc = BBC_W'(2);
        nctx.off = dec.call_off;
      end
      CF_JALR: begin
        npc = {jalr_target[XLEN-1:1], 1'b0};
        if (dec.is_ret) begin
          pop = 1'b1;
          set = 1'b0;
        end else if (dec.is_call) begin
          push = 1'b1;
          set  = 1'b0;
          nctx = CTX_INIT;
        end else begin
          nctx = ctx;
        end
      end
      CF_XRET: begin
        npc = {jalr_target[XLEN-1:1], 1'b0};   // the saved trap PC
        pop = 1'b1;
        set = 1'b0;
      end
      default: ;
    endcase
  end

endmodule
