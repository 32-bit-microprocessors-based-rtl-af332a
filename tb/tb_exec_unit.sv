// tb_exec_unit: self-checking test of the E-stage with the store buffer,
// the bus interface and the memory model (one wait state).
// Random ALU and shift micro-operations are checked against a register model
// (read back through the observation port); stores and loads are checked
// through memory; back-to-back stores must wait for the store buffer while
// ALU work between stores must overlap the write cycle; a BVCPY and a BVSCH
// run with their operands in R0..R4.
module tb_exec_unit;
  logic [3:0]  ag_ra [2] = '{4'd0, 4'd0};
  logic [31:0] ag_rd [2];
  import gm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] ring;
  logic int_mode, uop_valid, uop_ready, sb_wr, sb_full, sb_empty;
  logic ev_sb_overlap, ev_sb_stall, ev_bv_word;
  uop_t uop;
  flags_t flags;
  logic [31:0] sb_addr, sb_data, dbg_rd;
  logic [3:0] dbg_ra;
  bus_req_t req [3];
  bus_rsp_t rsp [3];
  logic bus_as, bus_cyc, bus_we, bus_rdy;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  logic [3:0] bus_be;
  int checks = 0, failures = 0;
  logic [31:0] m [16];
  int overlaps = 0, stalls = 0, words = 0;

  exec_unit dut (.clk, .rst_n, .ring, .int_mode, .uop_valid, .uop, .uop_ready, .flags,
    .op_o(req[1]), .op_i(rsp[1]), .sb_wr, .sb_addr, .sb_data, .sb_full, .sb_empty,
    .ag_ra, .ag_rd, .dbg_ra, .dbg_rd, .ev_sb_overlap, .ev_sb_stall, .ev_bv_word);
  store_buffer u_sb (.clk, .rst_n, .wr_en(sb_wr), .wr_addr(sb_addr), .wr_be(4'hf),
    .wr_data(sb_data), .full(sb_full), .empty(sb_empty), .bus_o(req[0]), .bus_i(rsp[0]));
  bus_interface u_biu (.clk, .rst_n, .req_i(req), .rsp_o(rsp),
    .bus_as, .bus_cyc, .bus_addr, .bus_we, .bus_be, .bus_wdata, .bus_rdata, .bus_rdy);
  tb_mem_model #(.WAIT(1)) mem (.*);
  assign req[2] = '0;
  always #5 clk = ~clk;
  always @(posedge clk) begin
    overlaps += int'(ev_sb_overlap); stalls += int'(ev_sb_stall); words += int'(ev_bv_word);
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    #4000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(uop_t u);
    @(negedge clk);
    uop = u; uop_valid = 1;
    #1;
    while (!uop_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 uop_valid = 0;
    // wait for multi-clock operations
    @(negedge clk);
    #1;
    while (!uop_ready) begin @(negedge clk); #1; end
  endtask

  function automatic uop_t mk(uop_kind_e k, logic [3:0] rs1, logic [3:0] rs2, logic [3:0] rd,
                              bit ui, logic [31:0] imm);
    uop_t u = '0;
    u.kind = k; u.rs1 = rs1; u.rs2 = rs2; u.rd = rd; u.use_imm = ui; u.imm = imm;
    return u;
  endfunction

  task automatic load_imm(logic [3:0] r, logic [31:0] v);
    uop_t u = mk(U_ALU, 0, 0, r, 1, v);
    u.alu = ALU_PASSB;
    issue(u);
    m[r] = v;
  endtask

  initial begin
    ring = 0; int_mode = 0; uop_valid = 0; uop = '0; dbg_ra = 0;
    foreach (m[i]) m[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // random ALU / shift
    for (int n = 0; n < 400; n++) begin
      automatic uop_t u = mk($urandom_range(0, 1) ? U_ALU : U_SHIFT, $urandom_range(0, 14),
                             $urandom_range(0, 14), $urandom_range(0, 14), $urandom_range(0, 1), $urandom);
      automatic logic [31:0] b, e;
      u.alu = alu_op_e'($urandom_range(4, 10));   // logic and pass operations
      u.sh  = shift_op_e'($urandom_range(0, 4));
      b = u.use_imm ? u.imm : m[u.rs2];
      if (u.kind == U_ALU)
        case (u.alu)
          ALU_AND: e = m[u.rs1] & b;  ALU_OR: e = m[u.rs1] | b;  ALU_XOR: e = m[u.rs1] ^ b;
          ALU_NOT: e = ~m[u.rs1];     ALU_NEG: e = -m[u.rs1];    ALU_PASSA: e = m[u.rs1];
          default: e = b;
        endcase
      else
        case (u.sh)
          SH_SHL: e = m[u.rs1] << b[4:0];
          SH_SHR: e = m[u.rs1] >> b[4:0];
          SH_SHA: e = $signed(m[u.rs1]) >>> b[4:0];
          SH_ROL: e = (m[u.rs1] << b[4:0]) | (b[4:0] == 0 ? 0 : m[u.rs1] >> (32 - b[4:0]));
          default: e = (m[u.rs1] >> b[4:0]) | (b[4:0] == 0 ? 0 : m[u.rs1] << (32 - b[4:0]));
        endcase
      issue(u);
      m[u.rd] = e;
      dbg_ra = u.rd; #1;
      check(dbg_rd == e, "ALU/shift result");
      check(flags.z == (e == 0), "z flag");
    end
    // stores and loads
    load_imm(5, 32'h0000_0800);
    for (int i = 0; i < 8; i++) begin
      load_imm(6, 32'hFACE_0000 + i);
      issue(mk(U_STORE, 5, 6, 0, 1, 4 * i));
    end
    // back-to-back stores (stall) then ALU work during a write (overlap)
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      uop = mk(U_STORE, 5, 6, 0, 1, 32 + 4 * i); uop_valid = 1; #1;
      while (!uop_ready) begin @(negedge clk); #1; end
      @(posedge clk); #1 uop_valid = 0;
    end
    for (int i = 0; i < 8; i++) begin
      issue(mk(U_LOAD, 5, 0, 7, 1, 4 * i));
      dbg_ra = 7; #1;
      check(dbg_rd == 32'hFACE_0000 + i, "load after store");
    end
    for (int i = 0; i < 4; i++) check(mem.peek(32'h820 + 4 * i) == 32'hFACE_0007, "back-to-back stores");
    check(stalls > 0, "store waited for the store buffer");
    check(overlaps > 0, "E-stage worked during a write cycle");
    // BVCPY 100 bits from 0x900 bit 3 to 0xA00 bit 17
    for (int i = 0; i < 8; i++) begin mem.poke(32'h900 + 4 * i, $urandom); mem.poke(32'hA00 + 4 * i, 0); end
    load_imm(0, 32'h900); load_imm(1, 3); load_imm(2, 32'hA00); load_imm(3, 17); load_imm(4, 100);
    begin
      automatic uop_t u = mk(U_BVMAP, 0, 0, 0, 0, 0);
      automatic bit ok = 1;
      u.bv_func = BV_COPY;
      issue(u);
      repeat (10) @(negedge clk);
      for (int i = 0; i < 100; i++) begin
        automatic int sp = 3 + i, dp = 17 + i;
        automatic logic [31:0] sw = mem.peek(32'h900 + 4 * (sp / 32)), dw = mem.peek(32'hA00 + 4 * (dp / 32));
        if (sw[31 - sp % 32] != dw[31 - dp % 32]) ok = 0;
      end
      check(ok, "BVCPY through the E-stage");
      check(words == 4, "BVCPY block count");
    end
    // BVSCH: bit 70 set in 0xB00
    for (int i = 0; i < 8; i++) mem.poke(32'hB00 + 4 * i, 0);
    mem.poke(32'hB08, 32'h0200_0000);
    load_imm(0, 32'hB00); load_imm(1, 5); load_imm(4, 200);
    begin
      automatic uop_t u = mk(U_BVSCH, 0, 0, 0, 0, 0);
      issue(u);
      dbg_ra = 1; #1;
      check(dbg_rd == 70 && !flags.z, "BVSCH result in R1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
