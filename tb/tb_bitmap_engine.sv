// tb_bitmap_engine: self-checking test of the bitmap engine together with
// the store buffer, the bus interface and the memory model.
// BVMAP: random source and destination offsets, lengths and logical
// functions, forward and backward, on separate areas; then overlapping
// copies (BVCPY) in the safe direction. Destination memory is compared bit
// by bit with a reference computed here, including the bits around the
// field that must not change. The test checks that a field of N destination
// words takes 3N + 1 bus cycles and, with no wait states, no more than
// 2 (3N + 1) + 4 clocks, i.e. the bus is busy at every step.
// BVSCH: random fields with a few 1 bits, including none; the offset of the
// first 1 is compared with the reference.
module tb_bitmap_engine;
  import gm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, mode, dir, busy, done, found, sb_wr, sb_full, sb_empty, ev_word;
  logic [3:0] func;
  logic [31:0] src_base, src_off, dst_base, dst_off, len, found_off, sb_addr, sb_data;
  bus_req_t req [3];
  bus_rsp_t rsp [3];
  logic bus_as, bus_cyc, bus_we, bus_rdy;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  logic [3:0] bus_be;
  int checks = 0, failures = 0;

  bitmap_engine dut (.clk, .rst_n, .start, .mode, .dir, .func, .src_base, .src_off,
    .dst_base, .dst_off, .len, .busy, .done, .found, .found_off,
    .rd_o(req[1]), .rd_i(rsp[1]), .sb_wr, .sb_addr, .sb_data, .sb_full, .ev_word);
  store_buffer u_sb (.clk, .rst_n, .wr_en(sb_wr), .wr_addr(sb_addr), .wr_be(4'hf),
    .wr_data(sb_data), .full(sb_full), .empty(sb_empty), .bus_o(req[0]), .bus_i(rsp[0]));
  bus_interface u_biu (.clk, .rst_n, .req_i(req), .rsp_o(rsp),
    .bus_as, .bus_cyc, .bus_addr, .bus_we, .bus_be, .bus_wdata, .bus_rdata, .bus_rdy);
  tb_mem_model mem (.*);
  assign req[2] = '0;
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    #20000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit getbit(logic [31:0] base, longint pos);
    logic [31:0] w;
    w = mem.peek(base + 32'(4 * (pos >>> 5)));
    return w[31 - (pos & 31)];
  endfunction

  // expected image of 64 destination-area words
  logic [31:0] exp_img [64];
  function automatic void setexp(longint pos, bit v);
    exp_img[pos >> 5][31 - (pos & 31)] = v;
  endfunction

  task automatic run(bit m, bit d, logic [3:0] f, logic [31:0] sb, logic [31:0] so,
                     logic [31:0] db, logic [31:0] doff, logic [31:0] l, output int clocks);
    @(negedge clk);
    mode = m; dir = d; func = f; src_base = sb; src_off = so; dst_base = db; dst_off = doff; len = l;
    start = 1;
    @(negedge clk);
    start = 0;
    clocks = 1;
    while (!done) begin @(negedge clk); clocks++; end
    while (!sb_empty || bus_cyc) @(negedge clk);
  endtask

  int clocks, n0, nw;
  initial begin
    start = 0; mode = 0; dir = 0; func = 0; src_base = 0; src_off = 0; dst_base = 0; dst_off = 0; len = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      automatic bit ovl = (t >= 80);
      automatic logic [31:0] sb = 32'h1000, db = ovl ? 32'h1000 : 32'h2000;
      automatic logic [31:0] so = $urandom_range(0, 400), doff = $urandom_range(0, 400);
      automatic logic [31:0] l = (t % 10 == 0) ? $urandom_range(1, 3) : $urandom_range(1, 1200);
      automatic logic [3:0] f = ovl ? BV_COPY : 4'($urandom);
      automatic bit d = ovl ? (so < doff) : $urandom_range(0, 1);
      bit sbits [];
      // fill both areas
      for (int i = 0; i < 64; i++) begin
        mem.poke(32'h1000 + 4 * i, $urandom);
        if (!ovl) mem.poke(32'h2000 + 4 * i, $urandom);
      end
      mem.poke(32'h0ffc, $urandom);
      for (int i = 0; i < 64; i++) exp_img[i] = mem.peek(db + 4 * i);
      sbits = new[l];
      for (int i = 0; i < l; i++) sbits[i] = getbit(sb, so + i);
      for (int i = 0; i < l; i++) begin
        automatic bit dv = getbit(db, doff + i);
        setexp(doff + i, f[{sbits[i], dv}]);
      end
      nw = ((doff + l - 1) >> 5) - (doff >> 5) + 1;
      n0 = mem.n_rd + mem.n_wr;
      run(0, d, f, sb, so, db, doff, l, clocks);
      begin
        automatic bit ok = 1;
        for (int i = 0; i < 64; i++) if (mem.peek(db + 4 * i) != exp_img[i]) ok = 0;
        check(ok, $sformatf("BVMAP result t=%0d so=%0d do=%0d len=%0d dir=%0d", t, so, doff, l, d));
      end
      check(mem.n_rd + mem.n_wr - n0 == 3 * nw + 1, "3N+1 bus cycles");
      check(clocks <= 2 * (3 * nw + 1) + 4, $sformatf("bus busy every step: %0d clocks for %0d words", clocks, nw));
    end
    // BVSCH
    for (int t = 0; t < 60; t++) begin
      automatic logic [31:0] so = $urandom_range(0, 100);
      automatic logic [31:0] l = $urandom_range(1, 256);
      automatic longint first = -1;
      for (int i = 0; i < 16; i++) mem.poke(32'h3000 + 4 * i, 0);
      if (t % 4 != 0)
        repeat ($urandom_range(1, 3)) begin
          automatic int p = $urandom_range(0, 400);
          automatic logic [31:0] w = mem.peek(32'h3000 + 4 * (p / 32));
          w[31 - p % 32] = 1;
          mem.poke(32'h3000 + 4 * (p / 32), w);
        end
      for (int i = 0; i < l; i++) if (first < 0 && getbit(32'h3000, so + i)) first = so + i;
      run(1, 0, 0, 32'h3000, so, 0, 0, l, clocks);
      check(found == (first >= 0), "BVSCH found");
      if (first >= 0) check(found_off == first, $sformatf("BVSCH offset %0d vs %0d", found_off, first));
    end
    // the 256-bit ready-queue table with only its last bit set: 8 words
    for (int i = 0; i < 8; i++) mem.poke(32'h3000 + 4 * i, 0);
    mem.poke(32'h301c, 32'h1);
    run(1, 0, 0, 32'h3000, 0, 0, 0, 256, clocks);
    check(found && found_off == 255, "BVSCH last of 256 bits");
    check(clocks <= 2 * 8 + 4, $sformatf("BVSCH 256 bits in %0d clocks", clocks));
    $display("BVSCH over 256 bits: %0d clocks", clocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
