// tb_branch_pred_table: self-checking test of the 1 x 256 branch history
// table. Random updates and lookups are compared with a reference array
// indexed by PC[8:1]; the test also checks that addresses 512 bytes apart
// share an entry and that bit 0 of the PC is ignored.
module tb_branch_pred_table;
  logic clk = 0, rst_n = 0;
  logic [31:0] lk_pc, upd_pc;
  logic lk_taken, upd_en, upd_taken;
  int checks = 0, failures = 0;
  bit ref_t [256];

  branch_pred_table dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upd_en = 0; upd_pc = 0; upd_taken = 0; lk_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // after reset everything predicts not taken
    for (int i = 0; i < 256; i++) begin
      lk_pc = i * 2; #1;
      check(lk_taken == 0, "reset value");
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      upd_en    = $urandom_range(0, 1);
      upd_pc    = $urandom;
      upd_taken = $urandom_range(0, 1);
      lk_pc     = $urandom;
      #1 check(lk_taken == ref_t[lk_pc[8:1]], "lookup");
      @(posedge clk);
      if (upd_en) ref_t[upd_pc[8:1]] = upd_taken;
    end
    // aliasing: an update at pc is seen at pc + 512 and pc ^ 1
    @(negedge clk);
    upd_en = 1; upd_pc = 32'h1000_0124; upd_taken = 1;
    @(negedge clk);
    upd_en = 0;
    lk_pc = 32'h1000_0324; #1 check(lk_taken == 1, "alias +512");
    lk_pc = 32'h1000_0125; #1 check(lk_taken == 1, "bit0 ignored");
    lk_pc = 32'h1000_0126; #1 check(lk_taken == ref_t[8'h93], "neighbour entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
