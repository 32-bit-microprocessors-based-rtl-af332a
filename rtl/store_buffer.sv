// store_buffer: one-entry, 4-byte store buffer of the E-stage.
//
// The E-stage hands a store (address, byte enables, data) to the buffer in
// one clock (wr_en) and carries on; the buffer then performs the write cycle
// through its own bus interface port. The store is offered to the bus
// interface in the same clock in which it is accepted, so with the bus free
// the write cycle starts at once. While the entry is occupied full = 1
// and a further store must wait; in the clock in which the bus acknowledges
// the write the buffer accepts the next store already and offers it to the
// bus interface at once, so back-to-back stores lose no clock.
//
// Memory ordering is kept by the bus interface, which serves this port ahead
// of operand reads. One 4-byte entry follows the document; the byte enables
// and the handshake are this design's choices.
//
// Lint notes: Of the bus answer only ack is used: the store buffer only
// writes, so rdata is ignored.
module store_buffer
  import gm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [31:0] wr_addr,
  input  logic [3:0]  wr_be,
  input  logic [31:0] wr_data,
  output logic        full,
  output logic        empty,
  output bus_req_t    bus_o,
  input  bus_rsp_t    bus_i
);
  logic        valid;
  logic [31:0] addr, data;
  logic [3:0]  be;

  assign full  = valid && !bus_i.ack;
  assign empty = !valid;

  // An empty buffer passes a new store straight to the bus interface in the
  // clock it is accepted; in the clock of ack the port likewise already
  // offers the store being accepted.
  logic pass;
  assign pass = !valid || bus_i.ack;
  always_comb begin
    bus_o.we = 1'b1;
    if (pass) begin
      bus_o.req   = wr_en;
      bus_o.be    = wr_be;
      bus_o.addr  = wr_addr;
      bus_o.wdata = wr_data;
    end else begin
      bus_o.req   = 1'b1;
      bus_o.be    = be;
      bus_o.addr  = addr;
      bus_o.wdata = data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      addr  <= '0;
      data  <= '0;
      be    <= '0;
    end else begin
      if (wr_en && !full) begin
        valid <= 1'b1;
        addr  <= wr_addr;
        data  <= wr_data;
        be    <= wr_be;
      end else if (bus_i.ack) begin
        valid <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full)
    else $error("store_buffer: write while full");
endmodule
