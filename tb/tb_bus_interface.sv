// tb_bus_interface: self-checking test of the bus interface.
// Three requesters issue random reads and writes to the memory model with
// 0 to 2 wait states. The test checks read data, final memory contents,
// fixed priority (port 0 before 1 before 2 when all wait), that every bus
// cycle takes exactly 2 + wait clocks, and that cycles follow each other
// without idle clocks while requests are pending.
module tb_bus_interface;
  import gm_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t req [3];   // what the ports show: nothing in the clock of their ack
  bus_req_t areq [3];  // what each agent holds
  bus_rsp_t rsp [3];
  logic bus_as, bus_cyc, bus_we, bus_rdy;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  logic [3:0] bus_be;
  int checks = 0, failures = 0;
  logic [31:0] shadow [64];

  bus_interface dut (.clk, .rst_n, .req_i(req), .rsp_o(rsp),
    .bus_as, .bus_cyc, .bus_addr, .bus_we, .bus_be, .bus_wdata, .bus_rdata, .bus_rdy);
  tb_mem_model mem (.*);
  for (genvar p = 0; p < 3; p++) begin : g_port
    assign req[p] = rsp[p].ack ? '0 : areq[p];
  end
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

  // bus cycle length and back-to-back check
  int cyc_len = 0, idle_with_req = 0, b2b = 0;
  bit other_waiting = 0;
  always @(posedge clk) if (rst_n) begin
    if (bus_cyc) cyc_len <= bus_rdy ? 0 : cyc_len + 1;
    if (bus_rdy) check(cyc_len + 1 == 2 + mem.wait_states, "bus cycle length");
    if (other_waiting) begin
      if (!bus_as) idle_with_req++;
      else b2b++;
    end
    other_waiting = 0;
    if (bus_rdy)
      for (int p = 0; p < 3; p++) if (areq[p].req && !rsp[p].ack) other_waiting = 1;
  end

  // one agent per port: random word reads / writes into its own 64-word area
  for (genvar p = 0; p < 3; p++) begin : g_ag
    initial begin
      areq[p] = '0;
      wait (rst_n);
      for (int n = 0; n < 150; n++) begin
        automatic int idx = $urandom_range(0, 15) + 16 * p;
        automatic bit w = $urandom_range(0, 1);
        @(negedge clk);
        areq[p].req   = 1;
        areq[p].we    = w;
        areq[p].be    = 4'hf;
        areq[p].addr  = 32'h100 + idx * 4;
        areq[p].wdata = $urandom;
        do @(posedge clk); while (!rsp[p].ack);
        if (w) shadow[idx] = areq[p].wdata;
        else check(rsp[p].rdata == shadow[idx], "read data");
        @(negedge clk) areq[p] = '0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
  end

  initial begin
    foreach (shadow[i]) begin shadow[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ws = 0; ws < 3; ws++) begin
      @(negedge clk);
      while (bus_cyc) @(negedge clk);
      mem.wait_states = ws;
      repeat (700) @(posedge clk);
    end
    // final memory equals the shadow
    repeat (50) @(posedge clk);
    for (int i = 0; i < 48; i++) check(mem.peek(32'h100 + i * 4) == shadow[i], "memory contents");
    check(idle_with_req == 0 && b2b > 20, "next cycle follows at once when another port waits");
    // priority check with all three asserted together
    @(negedge clk);
    for (int p = 0; p < 3; p++) begin
      areq[p] = '{req: 1, we: 0, be: 4'hf, addr: 32'h800 + p * 4, wdata: 0};
    end
    begin
      int order [$];
      while (order.size() < 3) begin
        @(posedge clk);
        for (int p = 0; p < 3; p++) if (rsp[p].ack) begin order.push_back(p); end
        @(negedge clk);
        for (int p = 0; p < 3; p++) if (order.size() > 0 && order[$] == p) areq[p] = '0;
      end
      check(order[0] == 0 && order[1] == 1 && order[2] == 2, "fixed priority");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
