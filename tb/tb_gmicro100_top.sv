// tb_gmicro100_top: end-to-end test of the processor pipeline at its
// default sizes.
//
// The testbench stands in for the two blocks that are not part of the RTL:
// the instruction decoder and the microprogram sequencer. It runs a short
// program whose instructions are described in a table here (the TRON opcode
// encodings are not used); in memory every halfword of the program area
// holds a value derived from its own address, so the decoder model checks
// that the instruction queue delivers the right halfwords at the right PC.
// Decoded instructions travel through an A / OF delay of two clocks to the
// E-stage. An architectural reference (the same table, executed in order)
// decides at the E-stage whether a branch is taken and what a return reads
// from the stack; every instruction reaching the E-stage must be the one the
// reference expects next, so wrong-path instructions have to be removed by
// the pipeline's flushes.
//
// The program exercises: pre-branch of BRA/BSR, a Bcc loop learned by the
// history table, an ACB-style loop falling through, pre-return hits, a
// return to a changed address (pre-return miss), recursion ten calls deep
// (PC stack overflow, then returns without pre-return), branch-buffer hits
// on loop targets, a full instruction queue behind a long bitmap operation,
// back-to-back stores waiting for the store buffer, ALU work overlapping a
// write, a BVCPY and a BVSCH checked in memory / registers, and a delayed
// interrupt held by IMASK and then accepted. Each must happen at least once.
// Afterwards the A-stage is given A-codes that use the registers the program
// left: a displacement mode whose word operand spans two memory words, a
// stack push and a two-step chained mode with a scaled index and one
// indirect memory read; the OF-stage's S-codes (address and operand read)
// are checked.
module tb_gmicro100_top;
  import gm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic bus_as, bus_cyc, bus_we, bus_rdy;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  logic [3:0] bus_be;
  logic [1:0] ring = 0;
  logic int_mode = 0, bb_general = 0, bb_inv = 0;
  logic [3:0] imask = 4'd15;
  logic [31:0] eitvb = 32'h0000_F000;
  logic [63:0] q_data;
  logic [2:0] q_count, q_take;
  logic [31:0] q_pc;
  logic d_valid, d_pred, d_pret;
  ctrl_kind_e d_kind, e_kind;
  logic [31:0] d_pc, d_disp, d_pc1;
  logic [3:0] d_len, e_len;
  logic e_valid, e_taken, e_pred, e_pret, flush;
  logic [31:0] e_pc, e_disp, e_pc1, e_pc2;
  logic uop_valid, uop_ready;
  uop_t uop;
  flags_t flags;
  logic [3:0] dbg_ra;
  logic [31:0] dbg_rd;
  logic reset_req = 0, exc_req = 0, int_req = 0, int_vectored = 0, dir_we = 0, eit_req, eit_ack = 0;
  logic [7:0] exc_vec = 0, int_vector = 0, eit_vec;
  logic [3:0] int_level = 0, dir_wdata = 0, dir_q;
  logic [31:0] eit_addr;
  events_t ev;
  logic ac_valid = 0, ac_ready, s_valid, s_ready = 1;
  acode_t ac = '0;
  scode_t s;

  gmicro100_top dut (.*);
  tb_mem_model #(.WAIT(0)) mem (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    #3000000 failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program table ----------------
  typedef enum int {I_NOP, I_UOP, I_BRA, I_BSR, I_BCC, I_LOOP, I_RET, I_RETX, I_HALT} ik_e;
  typedef struct {
    ik_e   k;
    int    len;     // bytes
    int    disp;    // branch displacement, or absolute return address for I_RETX
    int    limit;   // Bcc/LOOP: taken while count < limit (Bcc with neg: taken once count >= limit)
    bit    neg;
    uop_t  u;
  } instr_t;
  instr_t prog [int];

  function automatic uop_t li(logic [3:0] r, logic [31:0] v);
    uop_t u = '0;
    u.kind = U_ALU; u.alu = ALU_PASSB; u.rd = r; u.use_imm = 1; u.imm = v;
    return u;
  endfunction
  function automatic uop_t st(logic [3:0] rb, logic [3:0] rs, logic [31:0] off);
    uop_t u = '0;
    u.kind = U_STORE; u.rs1 = rb; u.rs2 = rs; u.use_imm = 1; u.imm = off;
    return u;
  endfunction
  function automatic uop_t add(logic [3:0] rd, logic [3:0] rs, logic [31:0] v);
    uop_t u = '0;
    u.kind = U_ALU; u.alu = ALU_ADD; u.rd = rd; u.rs1 = rs; u.use_imm = 1; u.imm = v;
    return u;
  endfunction

  task automatic put(int pc, ik_e k, int len, int disp = 0, int limit = 0, bit neg = 0, uop_t u = '0);
    prog[pc] = '{k: k, len: len, disp: disp, limit: limit, neg: neg, u: u};
  endtask

  task automatic build();
    uop_t bv = '0, sc = '0;
    bv.kind = U_BVMAP; bv.bv_func = BV_COPY;
    sc.kind = U_BVSCH;
    put('h000, I_UOP, 4, 0, 0, 0, li(5, 32'h800));           // R5 = store area
    put('h004, I_UOP, 4, 0, 0, 0, add(6, 6, 1));             // loop body: R6++
    put('h008, I_BSR, 4, 'h100 - 'h008);                     // call sub1
    put('h00C, I_BCC, 2, 'h004 - 'h00C, 6);                  // taken 6 times
    put('h00E, I_UOP, 2, 0, 0, 0, st(5, 6, 0));              // two back-to-back stores
    put('h010, I_UOP, 2, 0, 0, 0, st(5, 6, 4));
    put('h012, I_UOP, 2, 0, 0, 0, add(7, 7, 3));             // ALU during the write
    put('h014, I_LOOP, 4, 'h00E - 'h014, 2);                 // ACB: taken twice, then falls
    put('h018, I_UOP, 4, 0, 0, 0, li(0, 32'h900));           // bitmap operands
    put('h01C, I_UOP, 4, 0, 0, 0, li(1, 5));
    put('h020, I_UOP, 4, 0, 0, 0, li(2, 32'hA00));
    put('h024, I_UOP, 4, 0, 0, 0, li(3, 9));
    put('h028, I_UOP, 4, 0, 0, 0, li(4, 600));
    put('h02C, I_UOP, 2, 0, 0, 0, bv);                       // BVCPY 600 bits
    put('h02E, I_BSR, 4, 'h200 - 'h02E);                     // call sub2 (returns elsewhere)
    put('h032, I_NOP, 2);                                    // skipped by the changed return
    put('h040, I_BSR, 4, 'h300 - 'h040);                     // recursive subroutine
    put('h044, I_UOP, 4, 0, 0, 0, li(0, 32'hB00));           // BVSCH operands
    put('h048, I_UOP, 4, 0, 0, 0, li(1, 0));
    put('h04C, I_UOP, 4, 0, 0, 0, li(4, 256));
    put('h050, I_UOP, 2, 0, 0, 0, sc);
    put('h052, I_BRA, 2, 'h060 - 'h052);
    put('h054, I_NOP, 2);                                    // never executed
    put('h060, I_HALT, 2);
    put('h100, I_UOP, 4, 0, 0, 0, add(8, 8, 1));             // sub1
    put('h104, I_RET, 2);
    put('h200, I_NOP, 2);                                    // sub2
    put('h202, I_RETX, 2, 'h040);                            // returns to 040, not 032
    put('h300, I_BCC, 2, 'h306 - 'h300, 10, 1);              // depth < 10: fall through
    put('h302, I_BSR, 4, 'h300 - 'h302);
    put('h306, I_RET, 2);
  endtask

  function automatic logic [15:0] hw(logic [31:0] a);
    return a[16:1] ^ 16'h3C00;
  endfunction

  // ---------------- architectural reference ----------------
  int rpc = 0;
  int rstack [$];
  int cnt [int];
  int retired = 0;

  // outcome of the instruction at the reference PC; advances the reference
  task automatic ref_step(output bit taken, output int pc2);
    instr_t i = prog[rpc];
    automatic int c = cnt.exists(rpc) ? cnt[rpc] : 0;
    taken = 0; pc2 = 0;
    case (i.k)
      I_BRA:  rpc = rpc + i.disp;
      I_BSR:  begin rstack.push_back(rpc + i.len); rpc = rpc + i.disp; end
      I_BCC, I_LOOP: begin
        taken = i.neg ? (c >= i.limit) : (c < i.limit);
        cnt[rpc] = c + 1;
        rpc = taken ? rpc + i.disp : rpc + i.len;
      end
      I_RET:  begin pc2 = rstack.pop_back(); rpc = pc2; end
      I_RETX: begin void'(rstack.pop_back()); pc2 = i.disp; rpc = pc2; end
      default: rpc = rpc + i.len;
    endcase
    retired++;
  endtask

  // ---------------- decoder and pipeline model ----------------
  typedef struct {
    int pc; bit pred; bit pret; logic [31:0] pc1; longint ready;
  } pe_t;
  pe_t pipe [$];
  longint cyc = 0;
  bit halted = 0;
  int n_wrongpath_flushed = 0, n_eit = 0, n_di_held = 0;
  int ev_cnt [string];

  function automatic ctrl_kind_e ck(ik_e k);
    case (k)
      I_BRA: return CT_BRA;
      I_BSR: return CT_BSR;
      I_BCC: return CT_BCC;
      I_LOOP: return CT_LOOP;
      I_RET, I_RETX: return CT_RET;
      default: return CT_NONE;
    endcase
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ev.prebranch)   ev_cnt["prebranch"]++;
    if (ev.mispredict)  ev_cnt["mispredict"]++;
    if (ev.preret_hit)  ev_cnt["preret_hit"]++;
    if (ev.preret_miss) ev_cnt["preret_miss"]++;
    if (ev.bb_hit)      ev_cnt["bb_hit"]++;
    if (ev.bb_fill)     ev_cnt["bb_fill"]++;
    if (ev.queue_full)  ev_cnt["queue_full"]++;
    if (ev.sb_overlap)  ev_cnt["sb_overlap"]++;
    if (ev.sb_stall)    ev_cnt["sb_stall"]++;
    if (ev.bv_word)     ev_cnt["bv_word"]++;
    if (ev.a_indirect)  ev_cnt["a_indirect"]++;
    if (ev.of_cross)    ev_cnt["of_cross"]++;
  end

  // E-stage state for micro-operations
  bit uop_busy = 0, uop_sent = 0;

  initial begin
    static int overflow_returns = 0;
    build();
    for (int a = 0; a < 32'h400; a += 4) mem.poke(a, {hw(a), hw(a + 2)});
    for (int i = 0; i < 32; i++) mem.poke(32'h900 + 4 * i, $urandom);
    for (int i = 0; i < 8; i++) mem.poke(32'hB00 + 4 * i, 0);
    mem.poke(32'hB14, 32'h0000_4000);   // bit 5*32 + 17 = 177
    d_valid = 0; d_kind = CT_NONE; d_pc = 0; d_disp = 0; d_len = 2; q_take = 0;
    e_valid = 0; e_kind = CT_NONE; e_pc = 0; e_disp = 0; e_len = 2; e_taken = 0; e_pred = 0;
    e_pret = 0; e_pc1 = 0; e_pc2 = 0; uop_valid = 0; uop = '0; dbg_ra = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (!halted) begin
      bit did_flush;
      @(negedge clk);
      d_valid = 0; e_valid = 0; q_take = 0; uop_valid = 0;
      did_flush = 0;
      // ---- E-stage ----
      if (uop_busy) begin
        #1;
        if (uop_ready) uop_busy = 0;   // multi-clock micro-operation finished
      end
      if (!uop_busy && pipe.size() != 0 && pipe[0].ready <= cyc) begin
        automatic pe_t p = pipe[0];
        automatic instr_t i = prog[p.pc];
        check(p.pc == rpc, $sformatf("E-stage got %h, expected %h", p.pc, rpc));
        if (i.k == I_UOP) begin
          uop = i.u; uop_valid = 1; #1;
          if (uop_ready) begin
            void'(pipe.pop_front());
            begin bit t; int x; ref_step(t, x); end
            // loads and bitmap operations take several clocks: wait for ready
            uop_busy = i.u.kind inside {U_LOAD, U_BVMAP, U_BVSCH};
          end
        end else if (i.k == I_HALT) begin
          halted = 1;
        end else begin
          automatic bit t;
          automatic int p2;
          automatic int pc0 = rpc;
          ref_step(t, p2);
          e_valid = (ck(i.k) != CT_NONE); e_kind = ck(i.k); e_pc = pc0; e_disp = i.disp;
          e_len = 4'(i.len); e_taken = t; e_pred = p.pred; e_pret = p.pret; e_pc1 = p.pc1; e_pc2 = p2;
          #1;
          if ((i.k == I_RET || i.k == I_RETX) && !p.pret) overflow_returns++;
          void'(pipe.pop_front());
          if (flush) begin
            did_flush = 1;
            n_wrongpath_flushed += pipe.size();
            pipe.delete();
          end
        end
      end
      // ---- D-stage ----
      #1;
      if (!did_flush && !halted && pipe.size() < 3 && prog.exists(q_pc)) begin
        automatic instr_t i = prog[q_pc];
        if (q_count * 2 >= i.len) begin
          automatic bit ok = 1;
          for (int h = 0; h < i.len / 2; h++) if (q_data[63-16*h -: 16] != hw(q_pc + 2 * h)) ok = 0;
          check(ok, $sformatf("instruction halfwords at %h", q_pc));
          q_take = 3'(i.len / 2);
          d_valid = (ck(i.k) != CT_NONE); d_kind = ck(i.k); d_pc = q_pc; d_disp = i.disp; d_len = 4'(i.len);
          #1;
          pipe.push_back('{pc: q_pc, pred: d_pred, pret: d_pret, pc1: d_pc1, ready: cyc + 3});
        end
      end
      // ---- EIT: delayed interrupt held by IMASK, then accepted ----
      if (cyc == 50) begin imask = 4'd2; dir_we = 1; dir_wdata = 4'd3; end
      else dir_we = 0;
      if (cyc > 52 && cyc < 60 && !eit_req && dir_q == 3) n_di_held++;
      if (cyc == 60) imask = 4'd7;
      eit_ack = 0;
      if (cyc > 60 && eit_req) begin
        #1;
        check(eit_vec == 8'h53 && eit_addr == 32'h0000_F298, "delayed interrupt 3 vector");
        eit_ack = 1; n_eit++;
      end
    end
    // ---- results ----
    repeat (20) @(negedge clk);
    dbg_ra = 6; #1;
    check(dbg_rd == 7, "loop count in R6");
    dbg_ra = 8; #1;
    check(dbg_rd == 7, "call count in R8");
    check(mem.peek(32'h800) == 7 && mem.peek(32'h804) == 7, "stores reached memory");
    begin
      automatic bit ok = 1;
      for (int b = 0; b < 600; b++) begin
        automatic int sp = 5 + b, dp = 9 + b;
        automatic logic [31:0] sw = mem.peek(32'h900 + 4 * (sp / 32)), dw = mem.peek(32'hA00 + 4 * (dp / 32));
        if (sw[31 - sp % 32] != dw[31 - dp % 32]) ok = 0;
      end
      check(ok, "BVCPY of 600 bits");
    end
    dbg_ra = 1; #1;
    check(dbg_rd == 177 && !flags.z, "BVSCH found bit 177");
    check(dir_q == 4'hf && n_eit == 1 && n_di_held > 0, "delayed interrupt held, then taken once");
    // ---- A- and OF-stages: operands from the registers the program left ----
    begin
      logic [31:0] rv [16];
      scode_t got [3];
      for (int r = 0; r < 16; r++) begin dbg_ra = 4'(r); #1; rv[r] = dbg_rd; end
      mem.poke(rv[8] + (rv[6] << 2) + 32'h100, 32'h0000_3000);
      mem.poke(32'h0000_3010, 32'hCAFE_F00D);
      // R6 = 7, so @(-16, R6) is the word at FFFFFFF7h, spanning two words
      mem.poke(32'hFFFF_FFF4, 32'h1122_3344);
      mem.poke(32'hFFFF_FFF8, 32'h5566_7788);
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        ac = '0;
        ac.size = 4;
        case (k)
          0: begin ac.mode = AM_DISP; ac.rn = 6; ac.disp = 32'hFFFF_FFF0; ac.fetch = 1; end
          1: begin ac.mode = AM_PUSH; end
          2: begin ac.mode = AM_CHAIN; ac.cbase = CB_REG; ac.rn = 8; ac.idx = 1; ac.rx = 6;
                   ac.scale = 2; ac.disp = 32'h100; ac.more = 1; end
          default: begin ac.mode = AM_CHAIN; ac.disp = 32'h10; ac.fetch = 1; end
        endcase
        ac_valid = 1;
        #1;
        while (!ac_ready) begin @(negedge clk); #1; end
        @(negedge clk);
        ac_valid = 0;
        if (k != 2) begin
          automatic int w = 0;
          while (!s_valid && w < 20) begin @(negedge clk); w++; end
          got[k == 3 ? 2 : k] = s;
          check(s_valid, "S-code delivered");
          @(negedge clk);
        end
      end
      check(got[0].addr == rv[6] - 16 && got[0].value == 32'h4455_6677,
            $sformatf("@(exp, Rn) across two words: %h at %h", got[0].value, got[0].addr));
      check(got[1].addr == rv[15] - 4 && got[1].sp_we && got[1].sp_new == rv[15] - 4, "A-stage @-SP");
      check(got[2].addr == 32'h0000_3010 && got[2].value == 32'hCAFE_F00D,
            "chained mode with index and indirection, operand read");
    end
    foreach (ev_cnt[k]) $display("event %-12s %0d", k, ev_cnt[k]);
    $display("retired %0d instructions in %0d clocks; %0d wrong-path instructions flushed; %0d returns without pre-return",
             retired, cyc, n_wrongpath_flushed, overflow_returns);
    begin
      automatic string names [12] = '{"prebranch", "mispredict", "preret_hit", "preret_miss", "bb_hit",
                                      "bb_fill", "queue_full", "sb_overlap", "sb_stall", "bv_word",
                                      "a_indirect", "of_cross"};
      foreach (names[k])
        check(ev_cnt.exists(names[k]) && ev_cnt[names[k]] > 0, {"mechanism happened: ", names[k]});
    end
    check(overflow_returns > 0, "PC stack overflow: return without pre-return");
    check(n_wrongpath_flushed > 0, "wrong-path instructions flushed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
