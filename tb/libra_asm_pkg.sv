// Instruction encoders used by the testbenches to build small programs.
//
// Standard RV32I encodings for the handful of instructions the tests use,
// plus the Libra variants: lo.br / tlo.br are branches with the prefix bits
// set to 2'b01 / 2'b10 and the level fields packed into the 12 branch
// immediate bits; lo.call is JAL x1 with prefix 2'b01 (real function) or
// 2'b10 (dummy function). LIBRA_CSR is the register number the test back end
// uses for the saved Libra context.
package libra_asm_pkg;

  localparam logic [2:0] F_BEQ = 3'b000, F_BNE = 3'b001, F_BLT = 3'b100,
                         F_BGE = 3'b101, F_BLTU = 3'b110, F_BGEU = 3'b111;
  localparam logic [11:0] LIBRA_CSR = 12'h7C0;
  localparam logic [31:0] ECALL = 32'h0000_0073;

  function automatic logic [31:0] enc_br(logic [2:0] f3, logic [4:0] rs1,
                                         logic [4:0] rs2, logic [12:0] imm);
    return {imm[12], imm[10:5], rs2, rs1, f3, imm[4:1], imm[11], 5'b11000, 2'b11};
  endfunction

  // lo.br: off_t:off_f:bbc
  function automatic logic [31:0] enc_lobr(logic [2:0] f3, logic [4:0] rs1,
                                           logic [4:0] rs2, int ot, int of, int bbc);
    logic [11:0] f;
    f = {4'(ot), 4'(of), 4'(bbc - 1)};
    return {f[11:5], rs2, rs1, f3, f[4:0], 5'b11000, 2'b01};
  endfunction

  // tlo.br: off_t:off_f:bbc:nslices
  function automatic logic [31:0] enc_tlobr(logic [2:0] f3, logic [4:0] rs1,
                                            logic [4:0] rs2, int ot, int of,
                                            int bbc, int ns);
    logic [11:0] f;
    f = {3'(ot), 3'(of), 3'(bbc - 1), 3'(ns - 1)};
    return {f[11:5], rs2, rs1, f3, f[4:0], 5'b11000, 2'b10};
  endfunction

  function automatic logic [31:0] enc_jal(logic [4:0] rd, logic [20:0] imm);
    return {imm[20], imm[10:1], imm[11], imm[19:12], rd, 5'b11011, 2'b11};
  endfunction

  // lo.call b, label (link in x1)
  function automatic logic [31:0] enc_locall(bit real_fn, logic [20:0] imm);
    return {imm[20], imm[10:1], imm[11], imm[19:12], 5'd1, 5'b11011,
            real_fn ? 2'b01 : 2'b10};
  endfunction

  function automatic logic [31:0] enc_jalr(logic [4:0] rd, logic [4:0] rs1,
                                           logic [11:0] imm);
    return {imm, rs1, 3'b000, rd, 5'b11001, 2'b11};
  endfunction

  function automatic logic [31:0] enc_addi(logic [4:0] rd, logic [4:0] rs1,
                                           logic [11:0] imm);
    return {imm, rs1, 3'b000, rd, 5'b00100, 2'b11};
  endfunction

  function automatic logic [31:0] enc_add(logic [4:0] rd, logic [4:0] rs1,
                                          logic [4:0] rs2);
    return {7'b0, rs2, rs1, 3'b000, rd, 5'b01100, 2'b11};
  endfunction

  function automatic logic [31:0] enc_sub(logic [4:0] rd, logic [4:0] rs1,
                                          logic [4:0] rs2);
    return {7'b0100000, rs2, rs1, 3'b000, rd, 5'b01100, 2'b11};
  endfunction

  // csrrw rd, LIBRA_CSR, rs1
  function automatic logic [31:0] enc_csrrw(logic [4:0] rd, logic [4:0] rs1);
    return {LIBRA_CSR, rs1, 3'b001, rd, 5'b11100, 2'b11};
  endfunction

  // csrrs rd, LIBRA_CSR, x0 (read only)
  function automatic logic [31:0] enc_csrr(logic [4:0] rd);
    return {LIBRA_CSR, 5'd0, 3'b010, rd, 5'b11100, 2'b11};
  endfunction

endpackage
