// End-to-end test of libra_frontend at its default parameters.
//
// The testbench plays the rest of a small core around the front end:
//   * an instruction cache that returns a line a fixed number of cycles
//     after each request and records every request with its cycle number,
//   * a 2-bit-counter branch direction predictor,
//   * an in-order back end with a register file that executes the few
//     instructions the programs use in a fixed number of cycles, resolves
//     branches and jumps, and implements the saved-context register.
// Programs (built with the test assembler, entered through a jalr from
// address 0):
//   P1  a two-block folded region: lo.br secret, 0:1:2, closed by lo.br
//   P2  the nested version: four blocks in the second level
//   P3  the same region as P1 closed by a terminating tlo.br instead
//   P4  a function folded with its dummy, called through lo.call
//   P1 and P2 are also run with an interrupt taken inside the folded
//       region; the handler at 0x1C0 counts in x14 and returns with mret.
//   P5  an ordinary loop (predicted branches, wrong predictions) and a
//       call chain two deep that spills the saved context in software
// Each folded program runs with every value of the secret. The results are
// checked against values worked out by hand, and the instruction-cache
// request trace (addresses and cycle numbers) and the run time must be
// identical for all secret values: the fetch path must not reveal the
// branch outcome. Each mechanism (lo.br stall, terminating-level exit,
// lo.call, return pop, ordinary call push, stack overflow, software
// restore, wrong prediction flush, predictor lookup, multi-line slice
// fetch, interrupt inside folded code and mret)
// Every lo.br stall must last the back end's resolution latency plus one
// cycle, the same for every outcome. is counted and must have happened; a predictor lookup inside a
// folded region counts as a failure.
module tb_libra_frontend;
  import libra_pkg::*;
  import libra_asm_pkg::*;

  localparam int LINE_BYTES = 32;
  localparam int IC_LAT = 2;
  localparam int EX_LAT = 3;
  localparam int MEM_WORDS = 256;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // DUT ports
  logic                    ic_req_valid, ic_req_ready, ic_resp_valid;
  logic [31:0]             ic_req_addr;
  logic [8*LINE_BYTES-1:0] ic_resp_data;
  logic                    bp_lookup_valid, bp_pred_taken, bp_upd_valid, bp_upd_taken;
  logic [31:0]             bp_lookup_pc, bp_upd_pc;
  logic                    out_valid, out_ready, out_illegal;
  logic [31:0]             out_pc, out_inst, out_link;
  libra_ctx_t              out_ctx, csr_prev_wdata, csr_prev_rdata;
  logic                    res_valid, res_taken;
  logic [31:0]             res_target;
  logic                    csr_prev_we, csr_prev_live;
  logic                    trap_valid;
  logic [31:0]             trap_pc;
  libra_ctx_t              trap_ctx;
  logic                    folded, lobr_stall, fe_flush, stack_ovf;

  libra_frontend dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ----------------------------------------------------------- program
  logic [31:0] imem[MEM_WORDS];

  task automatic put(logic [31:0] addr, logic [31:0] w);
    imem[addr[31:2]] = w;
  endtask

  // ---------------------------------------------------------- I-cache
  int          cyc;             // cycles since the run started
  bit          ic_busy;
  int          ic_cnt;
  logic [31:0] ic_addr;
  logic [63:0] trace[$];

  assign ic_req_ready = !ic_busy;

  always @(posedge clk) begin
    ic_resp_valid <= 1'b0;
    if (!rst_n) begin
      ic_busy <= 0;
    end else if (!ic_busy && ic_req_valid) begin
      ic_busy <= 1;
      ic_cnt  <= IC_LAT;
      ic_addr <= ic_req_addr;
      trace.push_back({32'(cyc), ic_req_addr});
    end else if (ic_busy) begin
      if (ic_cnt == 1) begin
        ic_busy       <= 0;
        ic_resp_valid <= 1'b1;
        for (int w = 0; w < LINE_BYTES / 4; w++)
          ic_resp_data[32*w +: 32] <= imem[(ic_addr[31:2] + 32'(w)) % MEM_WORDS];
      end
      ic_cnt <= ic_cnt - 1;
    end
  end

  // -------------------------------------------------------- predictor
  logic [1:0] bp_cnt[16];
  assign bp_pred_taken = bp_cnt[bp_lookup_pc[5:2]][1];
  always @(posedge clk) begin
    if (!rst_n) begin
      foreach (bp_cnt[i]) bp_cnt[i] <= 2'b01;
    end else if (bp_upd_valid) begin
      if (bp_upd_taken && bp_cnt[bp_upd_pc[5:2]] != 2'b11)
        bp_cnt[bp_upd_pc[5:2]] <= bp_cnt[bp_upd_pc[5:2]] + 2'd1;
      if (!bp_upd_taken && bp_cnt[bp_upd_pc[5:2]] != 2'b00)
        bp_cnt[bp_upd_pc[5:2]] <= bp_cnt[bp_upd_pc[5:2]] - 2'd1;
    end
  end

  // --------------------------------------------------------- back end
  logic [31:0] x[32];
  bit          be_busy, halted;
  int          be_cnt;
  logic [31:0] be_inst, be_pc, be_link;
  // interrupt injection: taken instead of accepting instruction number irq_at
  localparam logic [31:0] HANDLER = 32'h1C0;
  int          irq_at, n_accepted;
  bit          irq_done;
  logic [31:0] mepc;
  logic        irq_now;

  assign irq_now   = (n_accepted == irq_at) && !irq_done && !trap_valid;
  assign out_ready = !be_busy && !halted && rst_n && !irq_now;

  function automatic logic [31:0] rd_reg(logic [4:0] r);
    return (r == 0) ? 32'h0 : x[r];
  endfunction

  always @(posedge clk) begin
    res_valid   <= 1'b0;
    csr_prev_we <= 1'b0;
    trap_valid  <= 1'b0;
    if (!rst_n) begin
      be_busy    <= 0;
      halted     <= 0;
      irq_done   <= 0;
      n_accepted <= 0;
    end else if (!be_busy && out_valid && irq_now) begin
      trap_valid <= 1'b1;         // take the interrupt before this instruction
      trap_pc    <= HANDLER;
      trap_ctx   <= out_ctx;
      mepc       <= out_pc;
      irq_done   <= 1;
    end else if (out_valid && out_ready) begin
      n_accepted <= n_accepted + 1;
      be_busy <= 1;
      be_cnt  <= EX_LAT;
      be_inst <= out_inst;
      be_pc   <= out_pc;
      be_link <= out_link;
    end else if (be_busy) begin
      be_cnt <= be_cnt - 1;
      if (be_cnt == 1) begin
        logic [4:0]  rd, rs1, rs2;
        logic [31:0] a, b, iimm;
        be_busy = 0;
        rd  = be_inst[11:7]; rs1 = be_inst[19:15]; rs2 = be_inst[24:20];
        a = rd_reg(rs1); b = rd_reg(rs2);
        iimm = {{20{be_inst[31]}}, be_inst[31:20]};
        unique case (be_inst[6:2])
          5'b00100: if (rd != 0) x[rd] <= a + iimm;                  // addi
          5'b01100: if (rd != 0) x[rd] <= be_inst[30] ? a - b : a + b; // add/sub
          5'b11000: begin                                            // branches
            res_valid <= 1'b1;
            unique case (be_inst[14:12])
              F_BEQ:  res_taken <= (a == b);
              F_BNE:  res_taken <= (a != b);
              F_BLT:  res_taken <= ($signed(a) < $signed(b));
              F_BGE:  res_taken <= ($signed(a) >= $signed(b));
              F_BLTU: res_taken <= (a < b);
              default: res_taken <= (a >= b);
            endcase
          end
          5'b11011: if (rd != 0) x[rd] <= be_link;                 // jal, lo.call
          5'b11001: begin                                          // jalr
            res_valid  <= 1'b1;
            res_target <= a + iimm;
            if (rd != 0) x[rd] <= be_link;
          end
          5'b11100: begin
            if (be_inst == ECALL) halted <= 1;
            else if (be_inst == 32'h3020_0073) begin                   // mret
              res_valid  <= 1'b1;
              res_target <= mepc;
            end
            else begin                                             // csrrw / csrr
              if (rd != 0) x[rd] <= 32'(csr_prev_rdata);
              if (be_inst[14:12] == 3'b001) begin
                csr_prev_we    <= 1'b1;
                csr_prev_wdata <= libra_ctx_t'(a[$bits(libra_ctx_t)-1:0]);
              end
            end
          end
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------ mechanism counters
  int n_lobr_stall, n_tlo_exit, n_locall, n_pop, n_push, n_ovf, n_flush;
  int n_bp_lookup, n_bp_folded, n_multiline, n_csr_wr, n_illegal, n_trap_folded;
  int req_since_issue;
  int stall_len, n_stall_bad, n_stalls;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (lobr_stall) begin
        n_lobr_stall++;
        stall_len <= stall_len + 1;
      end else if (stall_len != 0) begin
        // fetch waits exactly the back end's resolution latency plus the
        // cycle in which the resolution is applied, whatever the outcome
        n_stalls++;
        if (stall_len != EX_LAT + 1) begin
          n_stall_bad++;
          $display("FAIL lo.br stall of %0d cycles", stall_len);
        end
        stall_len <= 0;
      end
      if (stack_ovf) n_ovf++;
      if (fe_flush) n_flush++;
      if (bp_lookup_valid) n_bp_lookup++;
      if (bp_lookup_valid && folded) n_bp_folded++;
      if (csr_prev_we) n_csr_wr++;
      if (trap_valid && trap_ctx != CTX_INIT) n_trap_folded++;
      if (ic_req_valid && ic_req_ready) req_since_issue++;
      if (out_valid && out_ready) begin
        if (out_illegal) n_illegal++;
        if (out_ctx.rem == REM_W'(1)) n_tlo_exit++;
        if (out_inst[6:2] == 5'b11011 && out_inst[1:0] != 2'b11) n_locall++;
        if (out_inst[6:2] == 5'b11011 && out_inst[1:0] == 2'b11 && out_inst[11:7] != 0)
          n_push++;
        if (out_inst[6:0] == 7'b1100111 && out_inst[11:7] == 0 && out_inst[19:15] == 1)
          n_pop++;
        if (out_ctx.bbc > 1 && req_since_issue > 1) n_multiline++;
        req_since_issue <= 0;
      end
    end else begin
      cyc <= 0;
      stall_len <= 0;
      req_since_issue <= 0;
    end
  end

  // ------------------------------------------------------------- runs
  task automatic run(logic [31:0] entry, logic [31:0] a0, logic [31:0] a1,
                     output int cycles, output logic [63:0] tr[$], input int irq = -1);
    rst_n = 0;
    irq_at = irq;
    trace.delete();
    foreach (x[i]) x[i] = 32'(i * 3 + 1);   // x18=55, x19=58, x20=61
    x[31] = entry;
    x[10] = a0;
    x[11] = a1;
    x[1]  = 32'hDEAD_0000;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    while (!halted) @(posedge clk);
    @(negedge clk);
    cycles = cyc;
    tr = trace;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int          cyc_a, cyc_b;
    logic [63:0] tr_a[$], tr_b[$];
    int          c0;
    logic [63:0] t0[$];

    foreach (imem[i]) imem[i] = 32'h0000_0013;   // nop
    put(32'h000, enc_jalr(0, 31, 0));

    // P1: lo.br secret, 0:1:2 (the slice at 0x1C..0x23 crosses a line)
    put(32'h018, enc_lobr(F_BNE, 10, 0, 0, 1, 2));
    put(32'h01C, enc_add(9, 18, 19));
    put(32'h020, enc_add(18, 19, 20));
    put(32'h024, enc_lobr(F_BEQ, 0, 0, 0, 0, 1));
    put(32'h028, enc_lobr(F_BEQ, 0, 0, 0, 0, 1));
    put(32'h02C, ECALL);
    // P2: nested region, four blocks in the second level
    put(32'h040, enc_lobr(F_BNE, 10, 0, 0, 1, 2));
    put(32'h044, enc_lobr(F_BNE, 11, 0, 0, 1, 4));
    put(32'h048, enc_lobr(F_BNE, 11, 0, 2, 3, 4));
    put(32'h04C, enc_addi(12, 12, 4));
    put(32'h050, enc_addi(12, 12, 8));
    put(32'h054, enc_addi(12, 12, -4));
    put(32'h058, enc_addi(12, 12, -8));
    for (int i = 0; i < 4; i++) put(32'h05C + 32'(4 * i), enc_lobr(F_BEQ, 0, 0, 0, 0, 1));
    put(32'h06C, ECALL);
    // P3: terminating level, one slice of two blocks
    put(32'h080, enc_tlobr(F_BNE, 10, 0, 0, 1, 2, 1));
    put(32'h084, enc_add(9, 18, 19));
    put(32'h088, enc_add(18, 19, 20));
    put(32'h08C, ECALL);
    // P4: lo.call of a function folded with its dummy
    put(32'h0A0, enc_lobr(F_BNE, 10, 0, 0, 1, 2));
    put(32'h0A4, enc_locall(1'b1, 21'(32'h0C0 - 32'h0A4)));
    put(32'h0A8, enc_locall(1'b0, 21'(32'h0C0 - 32'h0A8)));
    put(32'h0AC, enc_lobr(F_BEQ, 0, 0, 0, 0, 1));
    put(32'h0B0, enc_lobr(F_BEQ, 0, 0, 0, 0, 1));
    put(32'h0B4, ECALL);
    put(32'h0C0, enc_addi(13, 13, 5));   // real
    put(32'h0C4, enc_addi(0, 0, 5));     // dummy
    put(32'h0C8, enc_jalr(0, 1, 0));     // ret
    put(32'h0CC, enc_jalr(0, 1, 0));     // ret
    // P5: predicted loop, then two nested ordinary calls
    put(32'h100, enc_addi(5, 0, 6));
    put(32'h104, enc_addi(6, 6, 1));
    put(32'h108, enc_addi(5, 5, -1));
    put(32'h10C, enc_br(F_BNE, 5, 0, -13'sd8));
    put(32'h110, enc_jal(1, 21'(32'h140 - 32'h110)));
    put(32'h114, ECALL);
    put(32'h140, enc_csrr(7));              // spill saved context
    put(32'h144, enc_addi(8, 1, 0));
    put(32'h148, enc_jal(1, 21'(32'h180 - 32'h148)));
    put(32'h14C, enc_addi(1, 8, 0));
    put(32'h150, enc_csrrw(0, 7));          // restore saved context
    put(32'h154, enc_jalr(0, 1, 0));
    put(32'h180, enc_addi(6, 6, 100));
    put(32'h184, enc_jalr(0, 1, 0));
    // interrupt handler
    put(32'h1C0, enc_addi(14, 14, 1));
    put(32'h1C4, 32'h3020_0073);          // mret

    // ---- P1
    run(32'h018, 1, 0, cyc_a, tr_a);
    chk(x[9] == 55 + 58 && x[18] == 55, "P1 secret=1 result");
    run(32'h018, 0, 0, cyc_b, tr_b);
    chk(x[18] == 58 + 61 && x[9] == 28, "P1 secret=0 result");
    chk(cyc_a == cyc_b, "P1 run time independent of secret");
    chk(tr_a == tr_b, "P1 fetch trace independent of secret");
    $display("P1: %0d cycles, %0d line requests", cyc_a, tr_a.size());

    // ---- P1 interrupted inside the folded region (before the add)
    run(32'h018, 1, 0, cyc_a, tr_a, 2);
    chk(x[9] == 55 + 58 && x[18] == 55 && x[14] == 43 + 1, "P1+irq secret=1 result");
    run(32'h018, 0, 0, cyc_b, tr_b, 2);
    chk(x[18] == 58 + 61 && x[9] == 28 && x[14] == 43 + 1, "P1+irq secret=0 result");
    chk(cyc_a == cyc_b && tr_a == tr_b, "P1+irq fetch independent of secret");
    // ... and inside the nested region, in the second level
    run(32'h040, 0, 1, cyc_a, tr_a, 3);
    chk(x[12] == 37 - 4 && x[14] == 44, "P2+irq result");

    // ---- P2: all four combinations, same trace
    for (int s = 0; s < 2; s++)
      for (int c = 0; c < 2; c++) begin
        int exp;
        run(32'h040, 32'(s), 32'(c), cyc_a, tr_a);
        exp = 37 + (s ? (c ? 4 : 8) : (c ? -4 : -8));
        chk(x[12] == 32'(exp), $sformatf("P2 result s=%0d c=%0d", s, c));
        if (s == 0 && c == 0) begin c0 = cyc_a; t0 = tr_a; end
        else begin
          chk(cyc_a == c0, "P2 run time independent of secret");
          chk(tr_a == t0, "P2 fetch trace independent of secret");
        end
      end
    $display("P2: %0d cycles", c0);

    // ---- P3
    run(32'h080, 1, 0, cyc_a, tr_a);
    chk(x[9] == 55 + 58 && x[18] == 55, "P3 secret=1 result");
    run(32'h080, 0, 0, cyc_b, tr_b);
    chk(x[18] == 58 + 61 && x[9] == 28, "P3 secret=0 result");
    chk(cyc_a == cyc_b && tr_a == tr_b, "P3 fetch independent of secret");
    $display("P3: %0d cycles (P1 with closing lo.br took longer)", cyc_a);

    // ---- P4
    run(32'h0A0, 1, 0, cyc_a, tr_a);
    chk(x[13] == 40 + 5, "P4 real function ran");
    chk(x[1] == 32'h0AC, "P4 link is the next slice");
    run(32'h0A0, 0, 0, cyc_b, tr_b);
    chk(x[13] == 40, "P4 dummy function ran");
    chk(x[1] == 32'h0B0, "P4 dummy link is the next slice");
    chk(cyc_a == cyc_b && tr_a == tr_b, "P4 fetch independent of secret");

    // ---- P5
    run(32'h100, 0, 0, cyc_a, tr_a);
    chk(x[6] == 19 + 6 + 100, "P5 loop and calls result");
    chk(!folded, "P5 ends outside folded code");

    // ---- mechanisms
    chk(n_lobr_stall > 0, "lo.br stall happened");
    chk(n_tlo_exit > 0, "terminating-level exit happened");
    chk(n_locall > 0, "lo.call happened");
    chk(n_pop > 0, "return pop happened");
    chk(n_push > 0, "ordinary call push happened");
    chk(n_ovf > 0, "stack overflow happened");
    chk(n_csr_wr > 0, "software restore happened");
    chk(n_flush > 0, "wrong-prediction flush happened");
    chk(n_bp_lookup > 0, "predictor lookup happened");
    chk(n_multiline > 0, "multi-line slice fetch happened");
    chk(n_bp_folded == 0, "no predictor lookup in folded code");
    chk(n_illegal == 0, "no illegal instruction");
    chk(n_trap_folded > 0, "trap inside folded code happened");
    chk(n_stalls > 0 && n_stall_bad == 0, "every lo.br stall lasts EX_LAT+1 cycles");
    $display("stall=%0d tlo_exit=%0d locall=%0d pop=%0d push=%0d ovf=%0d csr=%0d flush=%0d bp=%0d multiline=%0d",
             n_lobr_stall, n_tlo_exit, n_locall, n_pop, n_push, n_ovf, n_csr_wr,
             n_flush, n_bp_lookup, n_multiline);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
