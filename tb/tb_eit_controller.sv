// tb_eit_controller: self-checking test of EIT selection.
// Random combinations of reset, exception, external interrupt (auto-vectored
// and externally vectored), IMASK and a DIR level are compared with a
// reference priority function; the vector table address is checked as
// EITVB + 8 * vector (for example INT 3 -> offset 218h, DI 2 -> 290h). A
// delayed interrupt must stay pending while IMASK blocks it and be cleared
// when it is taken.
module tb_eit_controller;
  import gm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic reset_req, exc_req, int_req, int_vectored, dir_we, eit_req, eit_ack;
  logic [7:0] exc_vec, int_vector, eit_vec;
  logic [3:0] int_level, imask, dir_wdata, dir_q;
  logic [31:0] eitvb, eit_addr;
  int checks = 0, failures = 0;

  eit_controller dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] mdir;
  initial begin
    reset_req = 0; exc_req = 0; int_req = 0; int_vectored = 0; dir_we = 0; eit_ack = 0;
    exc_vec = 0; int_vector = 0; int_level = 0; imask = 15; dir_wdata = 15; eitvb = 32'h0001_0000;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: INT 3 and DI 2 offsets from the vector table
    @(negedge clk); int_req = 1; int_level = 3; #1;
    check(eit_req && eit_vec == 8'h43 && eit_addr == 32'h0001_0218, "INT3 vector");
    int_req = 0; dir_we = 1; dir_wdata = 2; imask = 2;
    @(negedge clk); dir_we = 0; #1;
    check(!eit_req && dir_q == 2, "DI 2 held while IMASK = 2");
    imask = 3; #1;
    check(eit_req && eit_vec == 8'h52 && eit_addr == 32'h0001_0290, "DI2 accepted when IMASK = 3");
    eit_ack = 1; @(negedge clk); eit_ack = 0; #1;
    check(dir_q == 15 && !eit_req, "DIR cleared when taken");
    // random against the model
    mdir = 15;
    for (int n = 0; n < 5000; n++) begin
      logic [7:0] ev;
      bit er, io, dio, tdi;
      @(negedge clk);
      reset_req    = ($urandom_range(0, 20) == 0);
      exc_req      = ($urandom_range(0, 6) == 0);
      exc_vec      = $urandom;
      int_req      = $urandom_range(0, 1);
      int_level    = $urandom;
      int_vectored = $urandom_range(0, 1);
      int_vector   = 8'h80 + 8'($urandom_range(0, 31) * 4);
      imask        = $urandom;
      eitvb        = {$urandom, 3'b000};
      dir_we       = ($urandom_range(0, 4) == 0);
      dir_wdata    = $urandom;
      eit_ack      = $urandom_range(0, 1);
      #1;
      io  = int_req && int_level != 15 && int_level < imask;
      dio = mdir != 15 && mdir < imask;
      tdi = 0; er = 1;
      if (reset_req) ev = 8'h00;
      else if (exc_req) ev = exc_vec;
      else if (io && !(dio && mdir < int_level)) ev = int_vectored ? int_vector : 8'h40 + int_level;
      else if (dio) begin ev = 8'h50 + mdir; tdi = 1; end
      else begin ev = 0; er = 0; end
      check(eit_req == er && (!er || eit_vec == ev), "selection");
      check(dir_q == mdir, "DIR");
      if (er) check(eit_addr == eitvb + 8 * ev, "vector table address");
      @(posedge clk);
      if (eit_ack && tdi) mdir = 15;
      else if (dir_we) mdir = dir_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
