// Control-flow decoder with the Libra instruction-set extension.
//
// Purely combinational. It classifies a 32-bit RISC-V instruction into the
// control-flow kinds the front end must treat differently and extracts the
// fields of the Libra instructions:
//   lo.br  c, off_t:off_f:bbc          - level-offset branch
//   tlo.br c, off_t:off_f:bbc:nslices  - terminating level-offset branch
//   lo.call b, label                   - level-offset call of a folded function
//
// Following the prototype, the Libra variants reuse the standard branch and
// JAL opcodes and are told apart by the two prefix bits inst[1:0] that a
// standard 32-bit RISC-V instruction sets to 2'b11. The exact assignment is
// this design's choice: 2'b01 selects lo.br (on branches) or lo.call with
// b = true (on JAL), 2'b10 selects tlo.br or lo.call with b = false.
//
// The 12 immediate bits of a branch, {inst[31:25], inst[11:7]}, are reused
// for the level fields (also this design's choice, sized to the prototype's
// limits of 16 basic blocks per level and 8 per terminating level):
//   lo.br : [11:8] off_t, [7:4] off_f, [3:0] bbc-1
//   tlo.br: [11:9] off_t, [8:6] off_f, [5:3] bbc-1, [2:0] nslices-1
// rs1, rs2 and funct3 keep their usual meaning, so the condition of a
// level-offset branch is any RISC-V branch comparison.
//
// mret is reported as its own kind: leaving a trap handler restores the
// Libra context saved when the trap was taken.
//
// `illegal` flags a prefix of 2'b00, a Libra prefix on an opcode that has no
// Libra variant, and a level offset that lies outside the next level.
module libra_decoder
  import libra_pkg::*;
(
  input  logic [31:0] inst,
  output dec_t        dec
);

  logic [4:0]  opc;
  logic [1:0]  pfx;
  logic [4:0]  rd, rs1;
  logic [11:0] f;

  assign opc = inst[6:2];
  assign pfx = inst[1:0];
  assign rd  = inst[11:7];
  assign rs1 = inst[19:15];
  assign f   = {inst[31:25], inst[11:7]};

  always_comb begin
    dec          = '0;
    dec.kind     = CF_NONE;
    dec.bbc      = BBC_W'(1);
    unique case (opc)
      OPC_BRANCH: begin
        dec.imm = {{(XLEN-12){inst[31]}}, inst[7], inst[30:25], inst[11:8], 1'b0};
        unique case (pfx)
          PFX_STD: dec.kind = CF_BR;
          PFX_LO: begin
            dec.kind  = CF_LOBR;
            dec.off_t = OFF_W'(f[11:8]);
            dec.off_f = OFF_W'(f[7:4]);
            dec.bbc   = BBC_W'(f[3:0]) + BBC_W'(1);
          end
          PFX_TLO: begin
            dec.kind    = CF_TLOBR;
            dec.off_t   = OFF_W'(f[11:9]);
            dec.off_f   = OFF_W'(f[8:6]);
            dec.bbc     = BBC_W'(f[5:3]) + BBC_W'(1);
            dec.nslices = REM_W'(f[2:0]) + REM_W'(1);
          end
          default: dec.illegal = 1'b1;
        endcase
        if ((dec.kind == CF_LOBR || dec.kind == CF_TLOBR) &&
            ({1'b0, dec.off_t} >= dec.bbc || {1'b0, dec.off_f} >= dec.bbc))
          dec.illegal = 1'b1;
      end
      OPC_JAL: begin
        dec.imm = {{(XLEN-20){inst[31]}}, inst[19:12], inst[20], inst[30:21], 1'b0};
        unique case (pfx)
          PFX_STD: begin
            dec.kind    = CF_JAL;
            dec.is_call = (rd != 5'd0);
          end
          PFX_LO: begin
            dec.kind     = CF_LOCALL;
            dec.is_call  = 1'b1;
            dec.call_off = '0;
          end
          PFX_TLO: begin
            dec.kind     = CF_LOCALL;
            dec.is_call  = 1'b1;
            dec.call_off = OFF_W'(1);
          end
          default: dec.illegal = 1'b1;
        endcase
      end
      OPC_JALR: begin
        dec.kind    = CF_JALR;
        dec.imm     = {{(XLEN-12){inst[31]}}, inst[31:20]};
        dec.is_call = (rd != 5'd0);
        dec.is_ret  = (rd == 5'd0) && (rs1 == 5'd1);
        if (pfx != PFX_STD) dec.illegal = 1'b1;
      end
      default: begin
        if (inst == INST_MRET) dec.kind = CF_XRET;
        if (pfx != PFX_STD) dec.illegal = 1'b1;
      end
    endcase
  end

endmodule
