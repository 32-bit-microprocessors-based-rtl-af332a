// tb_alu32: self-checking test of the 32-bit ALU. Random and corner-case
// operands for every operation are compared with results and flags computed
// here with 33-bit and signed arithmetic.
module tb_alu32;
  import gm_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, y;
  logic cin;
  flags_t flags;
  int checks = 0, failures = 0;

  alu32 dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s op=%0d a=%h b=%h", what, op, a, b); end
  endtask

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'h1234_5678};
    for (int n = 0; n < 6000; n++) begin
      logic [32:0] e;
      logic [31:0] ey;
      bit ec, ev;
      op  = alu_op_e'($urandom_range(0, 11));
      a   = (n % 3 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      b   = (n % 5 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      cin = $urandom_range(0, 1);
      #1;
      ec = 0; ev = 0;
      case (op)
        ALU_ADD:  begin e = a + b;         ey = e[31:0]; ec = e[32]; ev = (a[31] == b[31]) && (ey[31] != a[31]); end
        ALU_ADDC: begin e = a + b + cin;   ey = e[31:0]; ec = e[32]; ev = (a[31] == b[31]) && (ey[31] != a[31]); end
        ALU_SUB, ALU_CMP: begin e = {1'b0, a} - {1'b0, b}; ey = e[31:0]; ec = a < b; ev = (a[31] != b[31]) && (ey[31] != a[31]); end
        ALU_SUBC: begin e = {1'b0, a} - {1'b0, b} - cin; ey = e[31:0]; ec = (33'(a) < 33'(b) + cin); ev = (a[31] != b[31]) && (ey[31] != a[31]); end
        ALU_NEG:  begin ey = -a; ec = (a != 0); ev = (a == 32'h8000_0000); end
        ALU_AND:  ey = a & b;
        ALU_OR:   ey = a | b;
        ALU_XOR:  ey = a ^ b;
        ALU_NOT:  ey = ~a;
        ALU_PASSA: ey = a;
        ALU_PASSB: ey = b;
        default:  ey = 'x;
      endcase
      check(y == ey, "result");
      check(flags.z == (ey == 0) && flags.n == ey[31], "z/n");
      check(flags.c == ec && flags.v == ev, "c/v");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
