// barrel_shifter: 32-bit barrel shifter of the execution datapath.
//
// Combinational. Shifts or rotates a 32-bit word by 0 to 31 places in one
// pass: logical left, logical right, arithmetic right, rotate left and rotate
// right. It is built as five stages of 2:1 multiplexers (shifts by 16, 8, 4,
// 2 and 1), the usual barrel-shifter structure. co is the last bit shifted
// out (0 for a shift by 0). The bitmap sequences use the left and right
// logical shifts to align source blocks with the destination.
//
// The document names a 32-bit barrel shifter; the operation set and the
// carry-out rule are this design's choices.
module barrel_shifter
  import gm_pkg::*;
(
  input  shift_op_e   op,
  input  logic [31:0] a,
  input  logic [4:0]  amt,
  output logic [31:0] y,
  output logic        co
);
  logic        left, rot, arith;
  logic [31:0] st [6];
  logic [31:0] fill;

  always_comb begin
    left  = (op == SH_SHL) || (op == SH_ROL);
    rot   = (op == SH_ROL) || (op == SH_ROR);
    arith = (op == SH_SHA);
    fill  = (arith && a[31]) ? '1 : '0;
    st[0] = a;
    for (int s = 0; s < 5; s++) begin
      int unsigned k;
      k = 1 << (4 - s);
      if (amt[4-s]) begin
        if (left) st[s+1] = (st[s] << k) | (rot ? st[s] >> (32 - k) : '0);
        else      st[s+1] = (st[s] >> k) | (rot ? st[s] << (32 - k) : fill << (32 - k));
      end else begin
        st[s+1] = st[s];
      end
    end
    y = st[5];
    if (amt == 0)   co = 1'b0;
    else if (left)  co = a[5'(6'd32 - {1'b0, amt})];
    else            co = a[amt - 1'b1];
  end
endmodule
