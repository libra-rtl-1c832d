// Self-checking test of libra_decoder.
//
// Builds random lo.br, tlo.br, ordinary branch, jal, lo.call and jalr
// encodings with the test assembler and checks every decoded field against
// the values the encoding was built from, plus the illegal-encoding cases
// (prefix 2'b00, Libra prefix on a non-control opcode or on jalr, level
// offset outside the next level).
module tb_libra_decoder;
  import libra_pkg::*;
  import libra_asm_pkg::*;

  logic [31:0] inst;
  dec_t        dec;
  int          checks = 0, failures = 0;

  libra_decoder dut (.inst(inst), .dec(dec));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s inst=%h kind=%s", what, inst, dec.kind.name());
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
    for (int i = 0; i < 400; i++) begin
      int bbc, ot, of, ns;
      logic [12:0] bimm;
      logic [20:0] jimm;
      logic [4:0]  r1, r2;
      r1 = 5'($urandom); r2 = 5'($urandom);

      // lo.br with in-range offsets
      bbc = 1 + ($urandom % 16); ot = $urandom % bbc; of = $urandom % bbc;
      inst = enc_lobr(F_BNE, r1, r2, ot, of, bbc); #1;
      chk(dec.kind == CF_LOBR && !dec.illegal, "lobr kind");
      chk(int'(dec.off_t) == ot && int'(dec.off_f) == of && int'(dec.bbc) == bbc,
          "lobr fields");
      chk(inst[19:15] == r1 && inst[24:20] == r2, "lobr regs kept");

      // tlo.br
      bbc = 1 + ($urandom % 8); ot = $urandom % bbc; of = $urandom % bbc;
      ns = 1 + ($urandom % 8);
      inst = enc_tlobr(F_BEQ, r1, r2, ot, of, bbc, ns); #1;
      chk(dec.kind == CF_TLOBR && !dec.illegal, "tlobr kind");
      chk(int'(dec.off_t) == ot && int'(dec.off_f) == of && int'(dec.bbc) == bbc
          && int'(dec.nslices) == ns, "tlobr fields");

      // lo.br with an offset outside the level
      bbc = 1 + ($urandom % 15); ot = bbc + ($urandom % (16 - bbc));
      inst = enc_lobr(F_BNE, r1, r2, ot, 0, bbc); #1;
      chk(dec.illegal, "lobr off_t out of range");

      // ordinary branch
      bimm = {13'($urandom)} & ~13'd1;
      inst = enc_br(F_BLT, r1, r2, bimm); #1;
      chk(dec.kind == CF_BR && !dec.illegal, "br kind");
      chk(dec.imm == {{19{bimm[12]}}, bimm}, "br imm");

      // jal / lo.call
      jimm = {21'($urandom)} & ~21'd1;
      inst = enc_jal(r1, jimm); #1;
      chk(dec.kind == CF_JAL && dec.is_call == (r1 != 0), "jal kind/call");
      chk(dec.imm == {{11{jimm[20]}}, jimm}, "jal imm");
      inst = enc_locall(1'b1, jimm); #1;
      chk(dec.kind == CF_LOCALL && dec.call_off == 0 && dec.is_call, "lo.call real");
      chk(dec.imm == {{11{jimm[20]}}, jimm}, "lo.call imm");
      inst = enc_locall(1'b0, jimm); #1;
      chk(dec.kind == CF_LOCALL && dec.call_off == 1, "lo.call dummy");

      // jalr
      inst = enc_jalr(r1, r2, 12'($urandom)); #1;
      chk(dec.kind == CF_JALR && dec.is_call == (r1 != 0) &&
          dec.is_ret == (r1 == 0 && r2 == 1), "jalr call/ret");

      // non-control
      inst = enc_add(r1, r2, r1); #1;
      chk(dec.kind == CF_NONE && !dec.illegal, "add");
      inst[1:0] = 2'b01; #1;
      chk(dec.illegal, "libra prefix on add");
      inst = enc_jalr(r1, r2, 12'd0); inst[1:0] = 2'b10; #1;
      chk(dec.illegal, "libra prefix on jalr");
      inst = enc_br(F_BEQ, r1, r2, 13'd8); inst[1:0] = 2'b00; #1;
      chk(dec.illegal, "prefix 00 on branch");
    end
    // the examples of the folding listings
    inst = enc_lobr(F_BNE, 5'd10, 5'd0, 0, 1, 2); #1;
    chk(dec.off_t == 0 && dec.off_f == 1 && dec.bbc == 2, "lo.br 0:1:2");
    inst = enc_lobr(F_BNE, 5'd11, 5'd0, 2, 3, 4); #1;
    chk(dec.off_t == 2 && dec.off_f == 3 && dec.bbc == 4, "lo.br 2:3:4");
    inst = 32'h3020_0073; #1;
    chk(dec.kind == CF_XRET && !dec.illegal, "mret");
    inst = 32'h0000_0073; #1;
    chk(dec.kind == CF_NONE, "ecall is not mret");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
