// tb_barrel_shifter: self-checking test of the 32-bit barrel shifter.
// Every shift amount with random data, for all five operations, is compared
// with a bit-by-bit reference computed in a loop, including the carry out.
module tb_barrel_shifter;
  import gm_pkg::*;
  shift_op_e op;
  logic [31:0] a, y;
  logic [4:0] amt;
  logic co;
  int checks = 0, failures = 0;

  barrel_shifter dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s op=%0d a=%h amt=%0d y=%h", what, op, a, amt, y); end
  endtask

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int s = 0; s < 32; s++) begin
        for (int o = 0; o < 5; o++) begin
          logic [31:0] e;
          bit ec;
          op = shift_op_e'(o); a = $urandom; amt = 5'(s);
          #1;
          e = a; ec = 0;
          for (int i = 0; i < s; i++) begin
            case (op)
              SH_SHL: begin ec = e[31]; e = {e[30:0], 1'b0}; end
              SH_SHR: begin ec = e[0];  e = {1'b0, e[31:1]}; end
              SH_SHA: begin ec = e[0];  e = {e[31], e[31:1]}; end
              SH_ROL: begin ec = e[31]; e = {e[30:0], e[31]}; end
              default: begin ec = e[0]; e = {e[0], e[31:1]}; end
            endcase
          end
          check(y == e, "result");
          check(co == ec, "carry out");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
