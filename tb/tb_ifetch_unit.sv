// tb_ifetch_unit: self-checking test of the IF-stage with the bus interface
// and the memory model (one wait state). Memory holds a pattern in which
// every halfword identifies its own address. Every clock the test checks
// that each valid halfword at the queue head is the one at q_pc + 2i. A
// random consumer removes halfwords and random redirects (to halfword- and
// word-aligned targets in a small area) restart fetch. The test checks that
// fetch restarts at the redirect target, that a branch target found in the
// branch buffer reaches the queue in the next clock without a bus cycle,
// that the queue fills up and holds fetch off, and that the general-cache
// mode fills the buffer with every fetched word.
module tb_ifetch_unit;
  import gm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic redirect, bb_general, bb_inv;
  logic [31:0] redirect_pc, d_pc;
  logic [63:0] d_data;
  logic [2:0] d_count, d_take;
  logic ev_bb_hit, ev_bb_fill, ev_queue_full;
  bus_req_t req [3];
  bus_rsp_t rsp [3];
  logic bus_as, bus_cyc, bus_we, bus_rdy;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  logic [3:0] bus_be;
  int checks = 0, failures = 0;

  ifetch_unit dut (.clk, .rst_n, .redirect, .redirect_pc, .bb_general, .bb_inv,
    .bus_o(req[2]), .bus_i(rsp[2]), .d_data, .d_count, .d_pc, .d_take,
    .ev_bb_hit, .ev_bb_fill, .ev_queue_full);
  bus_interface u_biu (.clk, .rst_n, .req_i(req), .rsp_o(rsp),
    .bus_as, .bus_cyc, .bus_addr, .bus_we, .bus_be, .bus_wdata, .bus_rdata, .bus_rdy);
  tb_mem_model #(.WAIT(1)) mem (.*);
  assign req[0] = '0;
  assign req[1] = '0;
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  function automatic logic [15:0] hw(logic [31:0] a);
    return a[16:1] ^ 16'hA500;
  endfunction

  initial begin
    #4000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hits = 0, fills = 0, fulls = 0, fast_targets = 0;
  always @(posedge clk) if (rst_n) begin
    hits  += int'(ev_bb_hit);
    fills += int'(ev_bb_fill);
    fulls += int'(ev_queue_full);
  end

  initial begin
    redirect = 0; redirect_pc = 0; bb_general = 0; bb_inv = 0; d_take = 0;
    for (int a = 0; a < 32'h2000; a += 4) mem.poke(a, {hw(a), hw(a + 2)});
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      redirect = 0;
      #1;
      for (int i = 0; i < d_count; i++)
        check(d_data[63-16*i -: 16] == hw(d_pc + 2 * i), "queue head contents");
      bb_general = (n >= 15000);
      if ($urandom_range(0, 40) == 0) begin
        redirect = 1;
        redirect_pc = {20'h0, 4'($urandom_range(0, 3)), 3'($urandom), 4'($urandom), 1'b0} + 32'h400;
        d_take = 0;
      end else begin
        d_take = (n % 500 < 60) ? 0 : 3'($urandom_range(0, d_count));
      end
      if (redirect) begin
        automatic logic [31:0] tgt = redirect_pc;
        automatic int nrd = mem.n_rd;
        automatic bit was_hit;
        @(negedge clk);
        redirect = 0; d_take = 0;
        #1;
        check(d_pc == tgt, "fetch restarts at target");
        was_hit = ev_bb_hit;
        @(negedge clk);
        #1;
        if (was_hit) begin
          fast_targets++;
          check(d_count >= (tgt[1] ? 1 : 2), "buffer hit: target in queue next clock");
        end
      end
    end
    check(hits > 50 && fills > 50, "branch buffer hits and fills");
    check(fulls > 0, "queue full held fetch");
    check(fast_targets > 20, "targets served by the branch buffer");
    $display("bb hits %0d, fills %0d, queue-full clocks %0d", hits, fills, fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
