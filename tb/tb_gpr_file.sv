// tb_gpr_file: self-checking test of the general register file. Random
// writes and reads under a changing ring number and interrupt flag are
// compared with a model holding R0..R14 and five separate stack pointers,
// so the test checks that R15 switches between SP0..SP3 and SPI.
module tb_gpr_file;
  logic clk = 0, rst_n = 0;
  logic [1:0] ring;
  logic int_mode, we;
  logic [3:0] ra, rb, wa, dbg_ra;
  logic [31:0] rd_a, rd_b, wd, dbg_rd;
  logic [2:0] sp_sel;
  logic [31:0] r0_r4 [5];
  logic [3:0] ag_ra [2];
  logic [31:0] ag_rd [2];
  int checks = 0, failures = 0;
  logic [31:0] mr [15];
  logic [31:0] msp [5];

  gpr_file dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] mread(logic [3:0] a);
    return a == 15 ? msp[int_mode ? 4 : ring] : mr[a];
  endfunction

  initial begin
    #400000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mr[i]) mr[i] = 0;
    foreach (msp[i]) msp[i] = 0;
    ring = 0; int_mode = 0; we = 0; ra = 0; rb = 0; ag_ra[0] = 0; ag_ra[1] = 0; wa = 0; wd = 0; dbg_ra = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      ring = $urandom; int_mode = ($urandom_range(0, 4) == 0);
      ra = $urandom; rb = $urandom; dbg_ra = $urandom; ag_ra[0] = $urandom; ag_ra[1] = $urandom;
      we = $urandom_range(0, 1);
      wa = ($urandom_range(0, 2) == 0) ? 4'd15 : 4'($urandom);
      wd = $urandom;
      #1;
      check(rd_a == mread(ra) && rd_b == mread(rb) && dbg_rd == mread(dbg_ra), "read");
      check(ag_rd[0] == mread(ag_ra[0]) && ag_rd[1] == mread(ag_ra[1]), "A-stage read");
      check(sp_sel == (int_mode ? 4 : ring), "sp_sel");
      for (int i = 0; i < 5; i++) check(r0_r4[i] == mr[i], "r0_r4");
      @(posedge clk);
      if (we) begin
        if (wa == 15) msp[int_mode ? 4 : ring] = wd; else mr[wa] = wd;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
