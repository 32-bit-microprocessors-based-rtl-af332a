// tb_mem_model: behavioural external memory for the testbenches.
//
// Answers the processor's external bus: a cycle starts with bus_as (T1);
// from the next clock (T2) the model inserts WAIT wait states and then
// raises bus_rdy for one clock, returning the addressed word for a read or
// writing the enabled bytes for a write. Memory is sparse (associative
// array of words, unwritten words read as 0). peek/poke give the testbench
// direct access; n_rd / n_wr count bus cycles.
module tb_mem_model #(
  parameter int WAIT = 0
) (
  input  logic        clk,
  input  logic        bus_as,
  input  logic        bus_cyc,
  input  logic [31:0] bus_addr,
  input  logic        bus_we,
  input  logic [3:0]  bus_be,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_rdy
);
  logic [31:0] mem [logic [29:0]];
  int wcnt = 0;
  int n_rd = 0, n_wr = 0;
  int wait_states = WAIT;

  function automatic logic [31:0] peek(input logic [31:0] a);
    return mem.exists(a[31:2]) ? mem[a[31:2]] : 32'd0;
  endfunction

  function automatic void poke(input logic [31:0] a, input logic [31:0] d);
    mem[a[31:2]] = d;
  endfunction

  assign bus_rdy   = bus_cyc && !bus_as && wcnt >= wait_states;
  assign bus_rdata = peek(bus_addr);

  always @(posedge clk) begin
    if (bus_as) wcnt <= 0;
    else if (bus_cyc) wcnt <= wcnt + 1;
    if (bus_rdy) begin
      if (bus_we) begin
        logic [31:0] o;
        o = peek(bus_addr);
        for (int b = 0; b < 4; b++)
          if (bus_be[3-b]) o[31-8*b -: 8] = bus_wdata[31-8*b -: 8];
        poke(bus_addr, o);
        n_wr++;
      end else begin
        n_rd++;
      end
    end
  end
endmodule
