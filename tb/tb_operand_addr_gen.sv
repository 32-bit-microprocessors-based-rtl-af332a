// tb_operand_addr_gen: self-checking test of the A-stage address generator,
// with the bus interface and the memory model.
//
// Random A-codes of every mode, including chained modes of one to three
// steps whose intermediate words are placed in memory beforehand, are sent
// while the OF-stage side accepts F-codes at random. A reference model
// computes each F-code from the same register values when its A-code is
// accepted; the F-codes must arrive in order and equal the model's. The
// test also checks the timing (F-code one clock after a simple A-code, one
// bus cycle more per chained step), that a flush drops a held F-code, and
// that a flush during a chained step's memory read discards the word read.
module tb_operand_addr_gen;
  import gm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic flush = 0, ac_valid = 0, ac_ready, f_valid, f_ready = 1, ev_indirect;
  acode_t ac = '0;
  fcode_t f;
  logic [3:0]  rf_ra, rf_rb;
  logic [31:0] rf_da, rf_db;
  bus_req_t req [3];
  bus_rsp_t rsp [3];
  logic bus_as, bus_cyc, bus_we, bus_rdy;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  logic [3:0] bus_be;
  int checks = 0, failures = 0, n_ind = 0;

  logic [31:0] regs [16];
  assign rf_da = regs[rf_ra];
  assign rf_db = regs[rf_rb];

  operand_addr_gen dut (.clk, .rst_n, .flush, .ac_valid, .ac, .ac_ready,
    .rf_ra, .rf_da, .rf_rb, .rf_db, .f_valid, .f, .f_ready,
    .bus_o(req[1]), .bus_i(rsp[1]), .ev_indirect);
  bus_interface u_biu (.clk, .rst_n, .req_i(req), .rsp_o(rsp),
    .bus_as, .bus_cyc, .bus_addr, .bus_we, .bus_be, .bus_wdata, .bus_rdata, .bus_rdy);
  tb_mem_model #(.WAIT(0)) mem (.*);
  assign req[0] = '0;
  assign req[2] = '0;
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ----
  fcode_t exp_q [$];
  logic        m_have = 0;
  logic [31:0] m_base = 0;

  function automatic logic [31:0] m_ea(acode_t a);
    logic [31:0] b, x;
    b = m_have ? m_base : a.cbase == CB_REG ? regs[a.rn] : a.cbase == CB_PC ? a.pc : 32'd0;
    x = a.idx ? regs[a.rx] << a.scale : 32'd0;
    return b + x + a.disp;
  endfunction

  function automatic fcode_t m_f(acode_t a);
    fcode_t r = '0;
    r.rn = a.rn;
    r.size = a.size;
    r.fetch = a.fetch && a.mode != AM_REG && a.mode != AM_IMM;
    case (a.mode)
      AM_REG:   r.is_reg = 1;
      AM_IMM:   begin r.is_imm = 1; r.addr = a.disp; end
      AM_IND:   r.addr = regs[a.rn];
      AM_DISP:  r.addr = regs[a.rn] + a.disp;
      AM_ABS:   r.addr = a.disp;
      AM_PCREL: r.addr = a.pc + a.disp;
      AM_POP:   begin r.addr = regs[15]; r.sp_we = 1; r.sp_new = regs[15] + 32'(a.size); end
      AM_PUSH:  begin r.addr = regs[15] - 32'(a.size); r.sp_we = 1; r.sp_new = r.addr; end
      default:  r.addr = m_ea(a);
    endcase
    return r;
  endfunction

  // F-code checker, sampling one time unit before each rising edge, when
  // everything the testbench drives has settled
  int n_f = 0;
  always begin
    @(negedge clk);
    #4;
    if (rst_n) begin
    if (ev_indirect) n_ind++;
    if (f_valid && f_ready) begin
      n_f++;
      if (exp_q.size() == 0) check(0, "F-code with none expected");
      else begin
        automatic fcode_t e = exp_q.pop_front();
        check(f == e, $sformatf("F-code addr %h expected %h", f.addr, e.addr));
      end
    end
    end
  end

  // Send one A-code; returns once it has been accepted.
  task automatic send(acode_t a);
    ac = a; ac_valid = 1;
    #1;
    while (!ac_ready) begin @(negedge clk); f_ready = 1'($urandom); #1; end
    if (a.mode == AM_CHAIN && a.more) begin
      // the word read at this step is the next step's base
      automatic logic [31:0] ea = m_ea(a);
      automatic logic [31:0] nb = $urandom;
      mem.poke(ea, nb);
      m_have = 1; m_base = nb;
    end else begin
      exp_q.push_back(m_f(a));
      m_have = 0;
    end
    @(negedge clk);
    ac_valid = 0;
  endtask

  function automatic acode_t rand_ac(addr_mode_e m);
    acode_t a = '0;
    a.mode = m; a.rn = 4'($urandom); a.rx = 4'($urandom);
    a.disp = ($urandom_range(0, 1) != 0) ? 32'($signed(16'($urandom))) : $urandom;
    a.pc = $urandom & ~32'h1;
    a.size = 3'(1 << $urandom_range(0, 2));
    a.cbase = chain_base_e'($urandom_range(0, 2));
    a.idx = 1'($urandom); a.scale = 2'($urandom);
    a.fetch = 1'($urandom);
    return a;
  endfunction

  longint t0;
  initial begin
    foreach (regs[i]) regs[i] = $urandom;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- timing: simple mode, then a two-step chain ----
    begin
      automatic acode_t a = rand_ac(AM_DISP);
      t0 = $time;
      send(a);
      check(f_valid && ($time - t0) / 10 == 1, "F-code one clock after the A-code");
      @(negedge clk);
      a = rand_ac(AM_CHAIN); a.more = 1;
      t0 = $time;
      send(a);
      a = rand_ac(AM_CHAIN); a.more = 0;
      send(a);
      // step accepted, read in T1 and T2 with the next step accepted at
      // the end of T2, F-code: 4 clocks
      check(f_valid && ($time - t0) / 10 == 4, $sformatf("two-step chain took %0d clocks", ($time - t0) / 10));
      @(negedge clk);
    end
    // ---- random traffic ----
    for (int n = 0; n < 3000; n++) begin
      automatic addr_mode_e m = addr_mode_e'($urandom_range(0, 8));
      f_ready = ($urandom_range(0, 9) < 7);
      if ($urandom_range(0, 3) == 0) regs[$urandom_range(0, 15)] = $urandom;
      if (m == AM_CHAIN) begin
        automatic int steps = $urandom_range(1, 3);
        for (int s = 0; s < steps; s++) begin
          automatic acode_t a = rand_ac(AM_CHAIN);
          a.more = (s != steps - 1);
          send(a);
          f_ready = ($urandom_range(0, 9) < 7);
        end
      end else begin
        send(rand_ac(m));
      end
    end
    f_ready = 1;
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0, "every F-code delivered");
    check(n_ind > 0, "chained indirect reads happened");
    // ---- flush drops a held F-code ----
    f_ready = 0;
    send(rand_ac(AM_ABS));
    check(f_valid, "F-code held");
    flush = 1; @(negedge clk); flush = 0;
    check(!f_valid, "flush drops the held F-code");
    void'(exp_q.pop_back());
    f_ready = 1;
    // ---- flush during a chained read ----
    begin
      automatic acode_t a = rand_ac(AM_CHAIN);
      a.more = 1;
      mem.poke(m_ea(a), 32'h5A5A_0000);   // the word that must be discarded
      ac = a; ac_valid = 1; @(negedge clk); ac_valid = 0;
      flush = 1; @(negedge clk); flush = 0;
      m_have = 0;
      repeat (3) @(negedge clk);
      a = rand_ac(AM_CHAIN); a.more = 0; a.cbase = CB_ZERO; a.idx = 0;
      send(a);
      @(negedge clk);
      check(exp_q.size() == 0, "chain after flush starts from its own base");
    end
    $display("F-codes %0d, indirect reads %0d", n_f, n_ind);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
