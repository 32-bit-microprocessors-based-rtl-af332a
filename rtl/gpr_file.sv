// gpr_file: the sixteen 32-bit general registers R0 to R15.
//
// R14 serves as the frame pointer and R15 as the stack pointer. There is one
// stack pointer for each protection ring (SP0 to SP3) and one for interrupt
// processing (SPI); R15 names whichever of them is selected by the current
// ring (ring) and the interrupt-processing flag (int_mode), so that changing
// ring or entering an interrupt switches stacks with no register copying.
// Two combinational read ports for the E-stage, two for operand address
// generation in the A-stage (ag_ra/ag_rd), a fifth for observation, direct
// outputs of R0..R4, and one write port (written at the clock
// edge); sp_sel shows which stack pointer R15 currently is.
//
// The register count, width, R14/R15 roles and the per-ring and interrupt
// stack pointers follow the document. Where ring and int_mode come from (in
// the architecture, fields of the PSW) is left to the surrounding logic, and
// clearing all registers at reset is this design's choice.
module gpr_file (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  ring,
  input  logic        int_mode,
  input  logic [3:0]  ra,
  output logic [31:0] rd_a,
  input  logic [3:0]  rb,
  output logic [31:0] rd_b,
  input  logic        we,
  input  logic [3:0]  wa,
  input  logic [31:0] wd,
  output logic [2:0]  sp_sel,
  output logic [31:0] r0_r4 [5],   // R0..R4 read directly (bitmap operands)
  input  logic [3:0]  ag_ra [2],   // A-stage base and index register
  output logic [31:0] ag_rd [2],
  input  logic [3:0]  dbg_ra,      // read port for observation
  output logic [31:0] dbg_rd
);
  logic [31:0] r  [15];  // R0..R14
  logic [31:0] sp [5];   // SP0..SP3, SPI (index 4)

  assign sp_sel = int_mode ? 3'd4 : {1'b0, ring};

  function automatic logic [31:0] rd(input logic [3:0] a, input logic [31:0] spv);
    return (a == 4'd15) ? spv : r[a];
  endfunction

  assign rd_a = rd(ra, sp[sp_sel]);
  assign rd_b = rd(rb, sp[sp_sel]);
  assign dbg_rd = rd(dbg_ra, sp[sp_sel]);
  assign ag_rd[0] = rd(ag_ra[0], sp[sp_sel]);
  assign ag_rd[1] = rd(ag_ra[1], sp[sp_sel]);
  for (genvar i = 0; i < 5; i++) begin : g_low
    assign r0_r4[i] = r[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 15; i++) r[i] <= '0;
      for (int i = 0; i < 5; i++)  sp[i] <= '0;
    end else if (we) begin
      if (wa == 4'd15) sp[sp_sel] <= wd;
      else             r[wa]      <= wd;
    end
  end
endmodule
