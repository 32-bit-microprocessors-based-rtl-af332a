// tb_operand_fetch: self-checking test of the OF-stage operand fetch, with
// the bus interface and the memory model.
//
// Random F-codes (register, immediate, write-only and read operands of 1, 2
// and 4 bytes at every byte offset, so that many read operands span two
// words) are sent while the E-stage side takes S-codes at random. A model
// computes each S-code from the memory contents; S-codes must arrive in
// order and match. The test also checks the timing (a single read costs one
// bus cycle, a spanning operand two back-to-back cycles, a pass-through
// operand none), and that a flush during a read discards its data.
module tb_operand_fetch;
  import gm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic flush = 0, f_valid = 0, f_ready, s_valid, s_ready = 1, ev_cross;
  fcode_t f = '0;
  scode_t s;
  bus_req_t req [3];
  bus_rsp_t rsp [3];
  logic bus_as, bus_cyc, bus_we, bus_rdy;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  logic [3:0] bus_be;
  int checks = 0, failures = 0, n_cross = 0, n_s = 0;

  operand_fetch dut (.clk, .rst_n, .flush, .f_valid, .f, .f_ready, .s_valid, .s, .s_ready,
    .bus_o(req[1]), .bus_i(rsp[1]), .ev_cross);
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
  scode_t exp_q [$];

  function automatic scode_t m_s(fcode_t x);
    scode_t r = '0;
    r.is_reg = x.is_reg; r.rn = x.rn; r.addr = x.addr;
    r.sp_we = x.sp_we; r.sp_new = x.sp_new;
    if (x.is_imm) r.value = x.addr;
    else if (x.fetch && !x.is_reg)
      for (int b = 0; b < int'(x.size); b++) begin
        automatic logic [31:0] a = x.addr + 32'(b);
        automatic logic [31:0] w = mem.peek(a);
        r.value = {r.value[23:0], w[31 - 8 * a[1:0] -: 8]};
      end
    return r;
  endfunction

  // S-code checker, sampling just before each rising edge
  always begin
    @(negedge clk);
    #4;
    if (rst_n) begin
      if (ev_cross) n_cross++;
      if (s_valid && s_ready) begin
        n_s++;
        if (exp_q.size() == 0) check(0, "S-code with none expected");
        else begin
          automatic scode_t e = exp_q.pop_front();
          check(s == e, $sformatf("S-code value %h at %h, expected %h at %h", s.value, s.addr, e.value, e.addr));
        end
      end
    end
  end

  task automatic send(fcode_t x);
    f = x; f_valid = 1;
    #1;
    while (!f_ready) begin @(negedge clk); s_ready = 1'($urandom); #1; end
    exp_q.push_back(m_s(x));
    @(negedge clk);
    f_valid = 0;
  endtask

  function automatic fcode_t rand_f(int kind);
    fcode_t x = '0;
    x.rn = 4'($urandom);
    x.addr = 32'h1000 + 32'($urandom_range(0, 255));
    x.size = 3'(1 << $urandom_range(0, 2));
    x.sp_we = 1'($urandom); x.sp_new = $urandom;
    case (kind)
      0: x.is_reg = 1;
      1: begin x.is_imm = 1; x.addr = $urandom; end
      2: x.fetch = 0;
      default: x.fetch = 1;
    endcase
    return x;
  endfunction

  longint t0;
  initial begin
    for (int a = 32'h1000; a < 32'h1108; a += 4) mem.poke(a, $urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- timing ----
    begin
      automatic fcode_t x = rand_f(3);
      x.addr = 32'h1010; x.size = 4;
      t0 = $time; send(x);
      while (!s_valid) @(negedge clk);
      check(($time - t0) / 10 == 4, $sformatf("aligned read: %0d clocks", ($time - t0) / 10));
      @(negedge clk);
      x.addr = 32'h1013; x.size = 2;
      t0 = $time; send(x);
      while (!s_valid) @(negedge clk);
      check(($time - t0) / 10 == 6, $sformatf("spanning read: %0d clocks", ($time - t0) / 10));
      @(negedge clk);
      x = rand_f(1);
      t0 = $time; send(x);
      check(s_valid && ($time - t0) / 10 == 1, "immediate passes in one clock");
      @(negedge clk);
    end
    // ---- random traffic ----
    for (int n = 0; n < 3000; n++) begin
      s_ready = ($urandom_range(0, 9) < 7);
      send(rand_f($urandom_range(0, 5)));
    end
    s_ready = 1;
    while (!f_ready || s_valid) @(negedge clk);
    repeat (2) @(negedge clk);
    check(exp_q.size() == 0, "every S-code delivered");
    check(n_cross > 0, "operands spanning two words were read");
    // ---- flush during a spanning read ----
    begin
      automatic fcode_t x = rand_f(3);
      x.addr = 32'h1022; x.size = 4;
      f = x; f_valid = 1; @(negedge clk); f_valid = 0;
      flush = 1; @(negedge clk); flush = 0;
      repeat (6) @(negedge clk);
      check(!s_valid && f_ready && exp_q.size() == 0, "flushed read gives no S-code");
      send(rand_f(1));
      @(negedge clk);
      check(exp_q.size() == 0, "next operand after the flush");
    end
    $display("S-codes %0d, spanning operands %0d", n_s, n_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
