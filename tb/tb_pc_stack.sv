// tb_pc_stack: self-checking test of the 8-entry return address stack.
// Random pushes and pops are compared with a reference model that keeps the
// newest eight entries (a push onto a full stack drops the oldest) and
// reports an empty stack as pop_valid = 0.
module tb_pc_stack;
  logic clk = 0, rst_n = 0;
  logic push, pop, pop_valid;
  logic [31:0] push_data, pop_data;
  logic [3:0] count;
  int checks = 0, failures = 0;
  logic [31:0] model [$];
  int overflows = 0, underflows = 0;

  pc_stack dut (.*);
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
    push = 0; pop = 0; push_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // phases: push-heavy, pop-heavy, mixed
      case ((n / 200) % 3)
        0: begin push = ($urandom_range(0, 3) != 0); pop = !push; end
        1: begin pop = ($urandom_range(0, 3) != 0); push = !pop; end
        default: begin push = $urandom_range(0, 1); pop = !push && $urandom_range(0, 1); end
      endcase
      push_data = $urandom;
      #1;
      check(pop_valid == (model.size() != 0), "pop_valid");
      check(count == model.size(), "count");
      if (model.size() != 0) check(pop_data == model[$], "pop_data");
      @(posedge clk);
      if (pop) begin
        if (model.size() != 0) void'(model.pop_back()); else underflows++;
      end
      if (push) begin
        model.push_back(push_data);
        if (model.size() > 8) begin void'(model.pop_front()); overflows++; end
      end
    end
    check(overflows > 0 && underflows > 0, "overflow and underflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
