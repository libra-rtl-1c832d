// Self-checking test of libra_next_pc.
//
// Part 1 walks the folded examples by hand: the lo.br region with two basic
// blocks (offsets 0:1, two blocks per slice), its nested version with four
// blocks in the second level, a tlo.br terminating level and a lo.call with
// its return address; the expected addresses were worked out on paper.
// Part 2 checks random PCs, contexts and instructions against the update
// rules written directly in the testbench.
module tb_libra_next_pc;
  import libra_pkg::*;
  import libra_asm_pkg::*;

  logic [31:0] pc, jalr_target, npc, link, slice_addr, next_slice;
  libra_ctx_t  ctx, nctx, push_save;
  dec_t        dec;
  logic [31:0] inst;
  logic        taken, set, push, pop;
  int          checks = 0, failures = 0;

  libra_decoder u_dec (.inst(inst), .dec(dec));
  libra_next_pc dut (.*);

  function automatic libra_ctx_t mk(int b, int o, int r = 0);
    libra_ctx_t c;
    c.bbc = BBC_W'(b); c.off = OFF_W'(o); c.rem = REM_W'(r);
    return c;
  endfunction

  task automatic step(logic [31:0] p, libra_ctx_t c, logic [31:0] i, bit t,
                      logic [31:0] exp_pc, libra_ctx_t exp_ctx, string what);
    pc = p; ctx = c; inst = i; taken = t; #1;
    checks++;
    if (npc !== exp_pc || (set || push) && nctx !== exp_ctx) begin
      failures++;
      $display("FAIL %s: npc=%h exp %h ctx=%h exp %h", what, npc, exp_pc, nctx, exp_ctx);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    jalr_target = 32'h0;
    // lo.br secret, 0:1:2 at 0x100; folded adds at 0x104/0x108, closing
    // lo.br zero, 0:0:1 at 0x10C/0x110, exit at 0x114
    step(32'h100, mk(1,0), enc_lobr(F_BNE,10,0,0,1,2), 1, 32'h104, mk(2,0), "lobr true");
    step(32'h100, mk(1,0), enc_lobr(F_BNE,10,0,0,1,2), 0, 32'h108, mk(2,1), "lobr false");
    step(32'h104, mk(2,0), enc_add(9,18,19), 0, 32'h10C, mk(2,0), "add off0");
    step(32'h108, mk(2,1), enc_add(18,19,20), 0, 32'h110, mk(2,1), "add off1");
    step(32'h10C, mk(2,0), enc_lobr(F_BEQ,0,0,0,0,1), 1, 32'h114, mk(1,0), "close off0");
    step(32'h110, mk(2,1), enc_lobr(F_BEQ,0,0,0,0,1), 1, 32'h114, mk(1,0), "close off1");
    // nested: second level has four blocks, lo.br c, 2:3:4 at offset 1
    step(32'h204, mk(2,1), enc_lobr(F_BNE,11,0,2,3,4), 1, 32'h210, mk(4,2), "nested t");
    step(32'h204, mk(2,1), enc_lobr(F_BNE,11,0,2,3,4), 0, 32'h214, mk(4,3), "nested f");
    step(32'h214, mk(4,3), enc_addi(12,12,-8), 0, 32'h224, mk(4,3), "level2 walk");
    // tlo.br secret, 0:1:2:1 - one slice of two, then leave at 0x30C
    step(32'h300, mk(1,0), enc_tlobr(F_BNE,10,0,0,1,2,1), 0, 32'h308, mk(2,1,1), "tlobr");
    step(32'h308, mk(2,1,1), enc_add(9,18,19), 0, 32'h30C, mk(1,0), "tlo exit off1");
    step(32'h304, mk(2,0,1), enc_add(9,18,19), 0, 32'h30C, mk(1,0), "tlo exit off0");
    step(32'h304, mk(2,0,3), enc_add(9,18,19), 0, 32'h30C, mk(2,0,2), "tlo count");
    // lo.call from offset 1 of a two-block slice: dummy part, link in next slice
    step(32'h408, mk(2,1), enc_locall(1'b0, 21'h38), 0, 32'h444, mk(2,1), "lo.call dummy");
    checks++;
    if (!push || push_save !== mk(2,1) || link !== 32'h410) begin
      failures++; $display("FAIL lo.call push/link %b %h %h", push, push_save, link);
    end
    step(32'h404, mk(2,0), enc_locall(1'b1, 21'h3C), 0, 32'h440, mk(2,0), "lo.call real");
    // ret pops, target from the back end
    jalr_target = 32'h410;
    step(32'h44C, mk(2,1), enc_jalr(0,1,0), 0, 32'h410, mk(2,1), "ret");
    checks++;
    if (!pop || push || set) begin failures++; $display("FAIL ret does not pop"); end
    // mret pops, resume PC from the back end
    jalr_target = 32'h108;
    step(32'h1C4, mk(1,0), 32'h3020_0073, 0, 32'h108, mk(1,0), "mret");
    checks++;
    if (!pop || push || set) begin failures++; $display("FAIL mret does not pop"); end
    // ordinary call pushes (1,0)
    step(32'h500, mk(1,0), enc_jal(1, 21'h100), 0, 32'h600, mk(1,0), "call");
    checks++;
    if (!push || link !== 32'h504) begin failures++; $display("FAIL call link"); end

    // random: non-control and lo.br rules
    for (int i = 0; i < 2000; i++) begin
      int b, o, r, bn, ot, of;
      logic [31:0] p, sa, ns, e;
      b = 1 + $urandom % 16; o = $urandom % b; r = ($urandom % 3 == 0) ? 1 + $urandom % 8 : 0;
      p = {$urandom} & ~32'h3;
      sa = p - 4 * o; ns = sa + 4 * b;
      // non-control
      if (r == 1) step(p, mk(b,o,r), enc_add(1,2,3), 0, ns, mk(1,0), "rand exit");
      else        step(p, mk(b,o,r), enc_add(1,2,3), 0, p + 4*b,
                       mk(b,o,(r == 0) ? 0 : r-1), "rand seq");
      // lo.br
      bn = 1 + $urandom % 16; ot = $urandom % bn; of = $urandom % bn;
      taken = $urandom;
      e = ns + 4 * (taken ? ot : of);
      step(p, mk(b,o,0), enc_lobr(F_BLT,5,6,ot,of,bn), taken, e,
           mk(bn, taken ? ot : of), "rand lobr");
      checks++;
      if (slice_addr !== sa || next_slice !== ns) begin
        failures++; $display("FAIL slice addresses");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
