// tb_branch_buffer: self-checking test of the 64 x 4-byte direct-mapped
// branch buffer. Random fills and lookups are compared with a reference
// model (valid, tag, data per index addr[7:2]); the test also checks a
// conflict eviction 256 bytes apart and the invalidate input.
module tb_branch_buffer;
  logic clk = 0, rst_n = 0;
  logic inv, lk_hit, wr_en;
  logic [31:0] lk_addr, lk_data, wr_addr, wr_data;
  int checks = 0, failures = 0;
  bit          m_v [64];
  logic [23:0] m_t [64];
  logic [31:0] m_d [64];
  int hits = 0;

  branch_buffer dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #400000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inv = 0; wr_en = 0; wr_addr = 0; wr_data = 0; lk_addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // addresses from a small window so that hits and conflicts both occur
      wr_en   = $urandom_range(0, 1);
      wr_addr = {22'h0, 2'($urandom_range(0, 3)), 6'($urandom), 2'b00} | 32'h0004_0000;
      wr_data = $urandom;
      lk_addr = {22'h0, 2'($urandom_range(0, 3)), 6'($urandom), 2'($urandom)} | 32'h0004_0000;
      inv     = (n % 1000 == 999);
      #1;
      begin
        automatic int i = lk_addr[7:2];
        automatic bit eh = m_v[i] && m_t[i] == lk_addr[31:8];
        check(lk_hit == eh, "hit");
        if (eh) begin hits++; check(lk_data == m_d[i], "data"); end
      end
      @(posedge clk);
      if (inv) foreach (m_v[i]) m_v[i] = 0;
      else if (wr_en) begin
        m_v[wr_addr[7:2]] = 1; m_t[wr_addr[7:2]] = wr_addr[31:8]; m_d[wr_addr[7:2]] = wr_data;
      end
    end
    // conflict: two addresses 256 bytes apart evict each other
    @(negedge clk); inv = 0; wr_en = 1; wr_addr = 32'h0000_2010; wr_data = 32'hAAAA_0001;
    @(negedge clk); wr_addr = 32'h0000_2110; wr_data = 32'hBBBB_0002;
    @(negedge clk); wr_en = 0;
    lk_addr = 32'h0000_2010; #1 check(!lk_hit, "evicted by conflict");
    lk_addr = 32'h0000_2112; #1 check(lk_hit && lk_data == 32'hBBBB_0002, "new line hit");
    check(hits > 100, "enough hits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
