// tb_store_buffer: self-checking test of the one-entry store buffer with
// the bus interface and memory model (2 wait states). A writer stores a
// sequence of words as fast as the buffer accepts them; the test checks
// final memory contents, that a store is accepted in one clock when the
// buffer is free, that full holds the writer off while a write is on the
// bus, and that back-to-back stores keep the bus busy.
module tb_store_buffer;
  import gm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en, full, empty;
  logic [31:0] wr_addr, wr_data;
  logic [3:0] wr_be;
  bus_req_t req [3];
  bus_rsp_t rsp [3];
  logic bus_as, bus_cyc, bus_we, bus_rdy;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  logic [3:0] bus_be;
  int checks = 0, failures = 0;

  store_buffer dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_be, .wr_data, .full, .empty,
                    .bus_o(req[0]), .bus_i(rsp[0]));
  bus_interface u_biu (.clk, .rst_n, .req_i(req), .rsp_o(rsp),
    .bus_as, .bus_cyc, .bus_addr, .bus_we, .bus_be, .bus_wdata, .bus_rdata, .bus_rdy);
  tb_mem_model #(.WAIT(2)) mem (.*);
  always #5 clk = ~clk;
  // Port 1: a reader that keeps the bus busy during the second phase, so
  // that stores wait in the buffer entry instead of passing straight through.
  logic rd_on = 0;
  always_comb begin
    req[1] = '0;
    req[1].req  = rd_on && !rsp[1].ack;
    req[1].addr = 32'h800;
  end
  assign req[2] = '0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #400000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0, t1, stalls = 0;
  initial begin
    wr_en = 0; wr_addr = 0; wr_data = 0; wr_be = 4'hf;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full, "empty after reset");
    t0 = $time;
    for (int i = 0; i < 20; i++) begin
      while (full) begin stalls++; @(negedge clk); end
      wr_en = 1; wr_addr = 32'h400 + 4 * i; wr_data = 32'hC0DE_0000 + i;
      wr_be = (i == 5) ? 4'b0011 : 4'hf;
      @(negedge clk);
      wr_en = 0;
      if (i == 0) check(full, "occupied after accepting");
    end
    while (!empty) @(negedge clk);
    t1 = $time;
    for (int i = 0; i < 20; i++)
      check(mem.peek(32'h400 + 4 * i) == ((i == 5) ? 32'h0000_0005 : 32'hC0DE_0000 + i), "memory");
    check(stalls > 0, "writer held off while full");
    // 20 bus cycles of 4 clocks each, back to back
    check((t1 - t0) / 10 <= 20 * 4 + 2, "back-to-back stores");
    check(mem.n_wr == 20, "write count");
    // Second phase: a reader competes; every store now waits in the entry.
    for (int i = 0; i < 16; i++) mem.poke(32'h600 + 4 * i, 32'hFFFF_FFFF);
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      rd_on = 1;
      while (!empty) @(negedge clk);
      repeat (2) @(negedge clk);   // the reader holds the bus by now
      wr_en = 1; wr_addr = 32'h600 + 4 * i; wr_data = 32'h1234_5600 + i;
      wr_be = 4'(i);
      @(negedge clk);
      wr_en = 0;
      if (i == 15) rd_on = 0;
    end
    while (!empty) @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      logic [31:0] exp;
      for (int b = 0; b < 4; b++)
        exp[8*b +: 8] = i[b] ? 8'(32'h1234_5600 + i >> (8 * b)) : 8'hFF;
      check(mem.peek(32'h600 + 4 * i) == exp, "byte enables of a waiting store");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
