// tb_instr_queue: self-checking test of the 16-byte instruction queue.
// Random word writes (whole words and low-halfword-only words), random
// removals of up to four halfwords and occasional flushes are compared with
// a halfword reference queue. The test checks the head window, the valid
// count and the free count, and that the queue fills to eight halfwords.
module tb_instr_queue;
  logic clk = 0, rst_n = 0;
  logic flush, wr_en, wr_lo_only;
  logic [31:0] wr_data;
  logic [3:0] free;
  logic [63:0] rd_data;
  logic [2:0] rd_count, rd_take;
  int checks = 0, failures = 0;
  logic [15:0] m [$];
  int fulls = 0;

  instr_queue dut (.*);
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
    flush = 0; wr_en = 0; wr_lo_only = 0; wr_data = 0; rd_take = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      #1;
      check(free == 8 - m.size(), "free");
      check(rd_count == ((m.size() > 4) ? 4 : m.size()), "count");
      for (int i = 0; i < 4 && i < m.size(); i++)
        check(rd_data[63-16*i -: 16] == m[i], "head data");
      if (m.size() == 8) fulls++;
      flush      = ($urandom_range(0, 99) == 0);
      wr_lo_only = ($urandom_range(0, 5) == 0);
      wr_en      = $urandom_range(0, 1) && (free >= (wr_lo_only ? 1 : 2));
      wr_data    = $urandom;
      rd_take    = 3'($urandom_range(0, rd_count));
      if (n % 400 < 100) rd_take = 0;  // let it fill up
      @(posedge clk);
      if (flush) m.delete();
      else begin
        for (int i = 0; i < rd_take; i++) void'(m.pop_front());
        if (wr_en) begin
          if (!wr_lo_only) m.push_back(wr_data[31:16]);
          m.push_back(wr_data[15:0]);
        end
      end
    end
    check(fulls > 0, "queue filled completely");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
