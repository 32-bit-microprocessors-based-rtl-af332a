// pc_stack: on-chip 32-bit x 8-entry return address stack for pre-return.
//
// A subroutine call pushes its return address here as well as on the
// external stack; a return (RTS, EXITD) pops it so that the D-stage can start
// fetching at the return address (PC1) before the real one (PC2) has been
// read from memory. The stack is circular: a push onto a full stack
// overwrites the oldest entry, and a pop from an empty stack returns
// pop_valid = 0, in which case no pre-return is made. A simultaneous push and
// pop (not expected) pops first, then pushes.
//
// Timing: pop_data/pop_valid are combinational from the current top; the
// push and pop take effect at the next clock edge.
// Width and depth follow the document; the overflow and underflow behaviour
// is this design's choice.
module pc_stack #(
  parameter int unsigned DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        push,
  input  logic [31:0] push_data,
  input  logic        pop,
  output logic [31:0] pop_data,
  output logic        pop_valid,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned PW = $clog2(DEPTH);

  logic [31:0]   mem [DEPTH];
  logic [PW-1:0] top;       // index of the next free slot
  logic [PW:0]   cnt;

  logic [PW-1:0] top_m1;
  assign top_m1    = top - 1'b1;
  assign pop_data  = mem[top_m1];
  assign pop_valid = (cnt != 0);
  assign count     = cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      top <= '0;
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      unique case ({push, pop && cnt != 0})
        2'b10: begin
          mem[top] <= push_data;
          top      <= top + 1'b1;
          if (cnt != DEPTH[PW:0]) cnt <= cnt + 1'b1;
        end
        2'b01: begin
          top <= top_m1;
          cnt <= cnt - 1'b1;
        end
        2'b11: mem[top_m1] <= push_data;  // pop then push: replace the top
        default: ;
      endcase
    end
  end
endmodule
