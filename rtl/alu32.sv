// alu32: 32-bit ALU of the execution datapath.
//
// Combinational. Adds, subtracts (with and without carry in), compares,
// negates and performs the bitwise logic functions on two 32-bit operands,
// and returns the result with zero, negative, overflow and carry flags.
// For subtraction and compare, c is the borrow (1 when a < b unsigned);
// CMP returns a - b with its flags. For the logic operations v and c are 0.
//
// The document names a 32-bit ALU but gives no operation list or flag rules;
// the operation set (from the arithmetic and logic instruction classes of the
// TRON instruction set) and the flag conventions are this design's choices.
module alu32
  import gm_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,
  output logic [31:0] y,
  output flags_t      flags
);
  logic [32:0] sum;
  logic        is_add, is_sub;

  always_comb begin
    is_add = 1'b0;
    is_sub = 1'b0;
    sum    = '0;
    y      = '0;
    unique case (op)
      ALU_ADD:  begin is_add = 1'b1; sum = {1'b0, a} + {1'b0, b}; end
      ALU_ADDC: begin is_add = 1'b1; sum = {1'b0, a} + {1'b0, b} + 33'(cin); end
      ALU_SUB, ALU_CMP: begin is_sub = 1'b1; sum = {1'b0, a} - {1'b0, b}; end
      ALU_SUBC: begin is_sub = 1'b1; sum = {1'b0, a} - {1'b0, b} - 33'(cin); end
      ALU_NEG:  begin is_sub = 1'b1; sum = 33'd0 - {1'b0, a}; end
      default: ;
    endcase
    unique case (op)
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_NOT:   y = ~a;
      ALU_PASSA: y = a;
      ALU_PASSB: y = b;
      default:   y = sum[31:0];
    endcase
    flags.z = (y == '0);
    flags.n = y[31];
    flags.c = (is_add || is_sub) ? sum[32] : 1'b0;
    if (is_add)
      flags.v = (a[31] == b[31]) && (y[31] != a[31]);
    else if (is_sub && op == ALU_NEG)
      flags.v = (a == 32'h8000_0000);
    else if (is_sub)
      flags.v = (a[31] != b[31]) && (y[31] != a[31]);
    else
      flags.v = 1'b0;
  end
endmodule
