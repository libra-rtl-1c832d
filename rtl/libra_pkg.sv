// Shared types and constants of the Libra front end.
//
// A Libra context records how the processor walks a folded code region: the
// basic-block count of the current level (bbc, the slice width in
// instructions) and the level offset of the basic block being executed (off).
// Outside folded code the context is (1, 0), so the PC advances one
// instruction at a time as usual. This design adds a third field, rem, that
// counts the slices left in a terminating level entered by tlo.br (0 when no
// terminating level is active).
//
// Field widths follow the limits of the prototype: up to 16 basic blocks per
// level (bbc in 1..16, off in 0..15) and up to 8 per terminating level. The
// instruction encoding (prefix bits and immediate layout) is this design's
// own choice; see libra_decoder.
package libra_pkg;

  localparam int unsigned XLEN       = 32;
  localparam int unsigned MAX_BBC    = 16;  // basic blocks per level
  localparam int unsigned MAX_TBBC   = 8;   // basic blocks per terminating level
  localparam int unsigned BBC_W      = $clog2(MAX_BBC + 1);  // holds 1..16
  localparam int unsigned OFF_W      = $clog2(MAX_BBC);      // holds 0..15
  localparam int unsigned REM_W      = $clog2(MAX_TBBC + 1); // holds 0..8

  typedef struct packed {
    logic [BBC_W-1:0] bbc;  // basic blocks in the current level
    logic [OFF_W-1:0] off;  // level offset of the executing basic block
    logic [REM_W-1:0] rem;  // slices left in a terminating level, 0 = none
  } libra_ctx_t;

  localparam libra_ctx_t CTX_INIT = '{bbc: BBC_W'(1), off: '0, rem: '0};

  // RISC-V major opcodes (inst[6:2]) that carry control flow
  localparam logic [4:0] OPC_BRANCH = 5'b11000;
  localparam logic [4:0] OPC_JALR   = 5'b11001;
  localparam logic [4:0] OPC_JAL    = 5'b11011;

  // Prefix bits inst[1:0]: 2'b11 is a standard 32-bit instruction, the other
  // two values select the Libra variants of branches and of JAL.
  localparam logic [31:0] INST_MRET = 32'h3020_0073;

  localparam logic [1:0] PFX_STD  = 2'b11;
  localparam logic [1:0] PFX_LO   = 2'b01;  // lo.br / lo.call with b = true
  localparam logic [1:0] PFX_TLO  = 2'b10;  // tlo.br / lo.call with b = false

  typedef enum logic [2:0] {
    CF_NONE,    // no control transfer
    CF_BR,      // ordinary conditional branch
    CF_LOBR,    // level-offset branch
    CF_TLOBR,   // terminating level-offset branch
    CF_JAL,     // direct jump or call
    CF_LOCALL,  // level-offset call
    CF_JALR,    // indirect jump, call or return
    CF_XRET     // return from a trap handler (mret)
  } cf_kind_e;

  typedef struct packed {
    cf_kind_e         kind;
    logic             illegal;   // malformed Libra instruction
    logic             is_call;   // writes a link register (rd != x0)
    logic             is_ret;    // jalr x0, 0(x1)
    logic [XLEN-1:0]  imm;       // sign-extended branch / jump offset
    logic [OFF_W-1:0] off_t;     // lo.br: level offset if condition true
    logic [OFF_W-1:0] off_f;     // lo.br: level offset if condition false
    logic [BBC_W-1:0] bbc;       // lo.br: basic blocks of the next level
    logic [REM_W-1:0] nslices;   // tlo.br: slices of the terminating level
    logic [OFF_W-1:0] call_off;  // lo.call: 0 = real function, 1 = dummy
  } dec_t;

endpackage
