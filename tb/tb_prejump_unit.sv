// tb_prejump_unit: self-checking test of the pre-jump logic.
// Directed cases first: BRA, BSR then RTS with a correct and a wrong PC1,
// RTS on an empty PC stack, a Bcc that is learned after one misprediction,
// an ACB/SCB that falls through, and a flush cancelling a decode in the same
// clock. Then random D-stage and E-stage traffic is compared every clock
// with a reference model holding its own history table and return stack.
module tb_prejump_unit;
  import gm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic d_valid, e_valid, e_taken, e_pred, e_pret;
  ctrl_kind_e d_kind, e_kind;
  logic [31:0] d_pc, d_disp, e_pc, e_disp, e_pc1, e_pc2;
  logic [3:0] d_len, e_len;
  logic d_redirect, d_pred, d_pret, flush;
  logic [31:0] d_target, d_pc1, flush_target;
  logic ev_prebranch, ev_mispredict, ev_preret_hit, ev_preret_miss;
  int checks = 0, failures = 0;

  prejump_unit dut (.*);
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

  task automatic idle();
    d_valid = 0; e_valid = 0; d_kind = CT_NONE; e_kind = CT_NONE;
    d_pc = 0; d_disp = 0; d_len = 2; e_pc = 0; e_disp = 0; e_len = 2;
    e_taken = 0; e_pred = 0; e_pret = 0; e_pc1 = 0; e_pc2 = 0;
  endtask

  task automatic dec(ctrl_kind_e k, logic [31:0] pc, logic [31:0] disp, logic [3:0] len);
    d_valid = 1; d_kind = k; d_pc = pc; d_disp = disp; d_len = len;
  endtask

  task automatic exe(ctrl_kind_e k, logic [31:0] pc, logic [31:0] disp, logic [3:0] len,
                     logic taken, logic pred, logic pret, logic [31:0] pc1, logic [31:0] pc2);
    e_valid = 1; e_kind = k; e_pc = pc; e_disp = disp; e_len = len;
    e_taken = taken; e_pred = pred; e_pret = pret; e_pc1 = pc1; e_pc2 = pc2;
  endtask

  // reference model
  bit mb [256];
  logic [31:0] ms [$];

  initial begin
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // BRA
    @(negedge clk); dec(CT_BRA, 32'h100, 32'h40, 2); #1;
    check(d_redirect && d_target == 32'h140 && d_pred, "BRA pre-branch");
    // BSR pushes PC + length
    @(negedge clk); dec(CT_BSR, 32'h200, 32'h100, 4); #1;
    check(d_redirect && d_target == 32'h300, "BSR pre-branch");
    // RTS pops 0x204
    @(negedge clk); dec(CT_RET, 32'h310, 0, 2); #1;
    check(d_redirect && d_pret && d_target == 32'h204 && d_pc1 == 32'h204, "pre-return");
    @(negedge clk); idle(); exe(CT_RET, 32'h310, 0, 2, 1, 0, 1, 32'h204, 32'h204); #1;
    check(!flush && ev_preret_hit, "pre-return confirmed");
    @(negedge clk); idle(); exe(CT_RET, 32'h310, 0, 2, 1, 0, 1, 32'h204, 32'h888); #1;
    check(flush && flush_target == 32'h888 && ev_preret_miss, "pre-return wrong: flush to PC2");
    // empty stack: no pre-return, E flushes to PC2
    @(negedge clk); idle(); dec(CT_RET, 32'h320, 0, 2); #1;
    check(!d_redirect && !d_pret, "no pre-return on empty stack");
    @(negedge clk); idle(); exe(CT_RET, 32'h320, 0, 2, 1, 0, 0, 0, 32'h500); #1;
    check(flush && flush_target == 32'h500, "return without pre-return");
    // Bcc learned
    @(negedge clk); idle(); dec(CT_BCC, 32'h1234, -32'sd20, 2); #1;
    check(!d_redirect && !d_pred, "Bcc first predicted not taken");
    @(negedge clk); idle(); exe(CT_BCC, 32'h1234, -32'sd20, 2, 1, 0, 0, 0, 0); #1;
    check(flush && flush_target == 32'h1220 && ev_mispredict, "Bcc mispredict flush to target");
    @(negedge clk); idle(); dec(CT_BCC, 32'h1234, -32'sd20, 2); #1;
    check(d_redirect && d_pred && d_target == 32'h1220, "Bcc predicted taken after history");
    @(negedge clk); idle(); exe(CT_BCC, 32'h1234, -32'sd20, 2, 0, 1, 0, 0, 0); #1;
    check(flush && flush_target == 32'h1236, "Bcc mispredict flush to fall-through");
    // ACB/SCB falling through
    @(negedge clk); idle(); dec(CT_LOOP, 32'h2000, -32'sd8, 4); #1;
    check(d_redirect && d_target == 32'h1ff8, "ACB pre-branch");
    @(negedge clk); idle(); exe(CT_LOOP, 32'h2000, -32'sd8, 4, 0, 1, 0, 0, 0); #1;
    check(flush && flush_target == 32'h2004, "ACB fall-through flush");
    // flush cancels a BSR decoded in the same clock (nothing pushed)
    @(negedge clk); idle(); dec(CT_BSR, 32'h3000, 32'h10, 2);
    exe(CT_BCC, 32'h40, 4, 2, 1, 0, 0, 0, 0); #1;
    check(flush && !d_redirect, "flush wins over pre-branch");
    @(negedge clk); idle(); dec(CT_RET, 32'h3100, 0, 2); #1;
    check(!d_redirect, "cancelled BSR pushed nothing");
    @(negedge clk); idle();
    // random traffic against the model (restart from reset)
    rst_n = 0; @(negedge clk); rst_n = 1;
    foreach (mb[i]) mb[i] = 0;
    for (int n = 0; n < 5000; n++) begin
      bit eflush;
      logic [31:0] eft;
      @(negedge clk); idle();
      if ($urandom_range(0, 1)) dec(ctrl_kind_e'($urandom_range(0, 6)), {20'h0, 11'($urandom), 1'b0},
                                   32'($signed(12'($urandom))), 4'(2 * $urandom_range(1, 4)));
      if ($urandom_range(0, 2) == 0) begin
        automatic logic [31:0] p1 = ($urandom_range(0, 3) == 0) ? 32'h0 : $urandom;
        exe(ctrl_kind_e'($urandom_range(0, 6)), {20'h0, 11'($urandom), 1'b0},
            32'($signed(12'($urandom))), 4'(2 * $urandom_range(1, 4)),
            $urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 1), p1,
            $urandom_range(0, 1) ? p1 : $urandom);
      end
      #1;
      // model: E-stage
      eflush = 0; eft = 0;
      if (e_valid) case (e_kind)
        CT_BCC:  if (e_taken != e_pred) begin eflush = 1; eft = e_taken ? e_pc + e_disp : e_pc + e_len; end
        CT_LOOP: if (!e_taken) begin eflush = 1; eft = e_pc + e_len; end
        CT_RET:  if (!(e_pret && e_pc1 == e_pc2)) begin eflush = 1; eft = e_pc2; end
        default: ;
      endcase
      check(flush == eflush && (!eflush || flush_target == eft), "E-stage model");
      if (d_valid && !eflush) begin
        case (d_kind)
          CT_BRA, CT_LOOP, CT_BSR: check(d_redirect && d_pred && d_target == d_pc + d_disp, "D pre-branch model");
          CT_BCC: check(d_redirect == mb[d_pc[8:1]] && d_pred == mb[d_pc[8:1]] &&
                        (!d_redirect || d_target == d_pc + d_disp), "D Bcc model");
          CT_RET: begin
            check(d_redirect == (ms.size() != 0) && d_pret == (ms.size() != 0), "D RET model");
            if (ms.size() != 0) check(d_target == ms[$], "D RET target model");
          end
          default: check(!d_redirect, "D no redirect");
        endcase
      end else check(!d_redirect, "D idle");
      @(posedge clk);
      if (e_valid && e_kind == CT_BCC) mb[e_pc[8:1]] = e_taken;
      if (d_valid && !eflush) begin
        if (d_kind == CT_RET && ms.size() != 0) void'(ms.pop_back());
        if (d_kind == CT_BSR || d_kind == CT_CALL) begin
          ms.push_back(d_pc + d_len);
          if (ms.size() > 8) void'(ms.pop_front());
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
