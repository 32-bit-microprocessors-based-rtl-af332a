// bus_interface: external bus interface of the processor.
//
// Arbitrates NREQ internal requesters onto one external bus with a 32-bit
// address and 32-bit data. Requester 0 has the highest priority; in the
// processor port 0 is the store buffer, port 1 operand reads of the E-stage,
// port 2 those of the OF-stage, port 3 the memory-indirect reads of the
// A-stage and port 4 instruction fetch, so pending stores always reach memory before a later read. A
// requester holds its request until it receives ack.
//
// A bus cycle takes at least two clocks: T1 (bus_as = 1, address, direction,
// byte enables and write data driven) and T2, in which the memory answers
// with bus_rdy. Each clock in T2 without bus_rdy is a wait state. In the
// clock of bus_rdy the requester gets ack (with bus_rdata for a read) and the
// next cycle is granted, so a new T1 follows at once. For this to work every
// requester must, in the clock of its ack, already show its next access or
// no request at all (never the access just finished); requesters build
// their request lines combinationally from ack to meet this rule.
//
// The 32/32-bit bus and the 2-clock minimum bus cycle follow the document;
// the signal set, priority order and wait-state handshake are this design's
// choices.
//
// Lint notes: rst_n is also the disable condition of the assertions; a linter
// reports that as a synchronous use of the asynchronous reset, while every
// flip-flop here resets asynchronously. The req flag of the latched request
// cur is not read again: the cycle state already says that a cycle runs.
module bus_interface
  import gm_pkg::*;
#(
  parameter int unsigned NREQ = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req_i [NREQ],
  output bus_rsp_t    rsp_o [NREQ],
  // external bus
  output logic        bus_as,      // T1 of a bus cycle
  output logic        bus_cyc,     // a bus cycle is under way (T1 or T2)
  output logic [31:0] bus_addr,
  output logic        bus_we,
  output logic [3:0]  bus_be,
  output logic [31:0] bus_wdata,
  input  logic [31:0] bus_rdata,
  input  logic        bus_rdy
);
  localparam int unsigned SW = (NREQ > 1) ? $clog2(NREQ) : 1;

  typedef enum logic [1:0] {S_IDLE, S_T1, S_T2} state_e;
  state_e         state;
  logic [SW-1:0]  owner;
  bus_req_t       cur;

  logic           done;
  logic           pick_ok;
  logic [SW-1:0]  pick;

  assign done = state == S_T2 && bus_rdy;

  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int i = NREQ - 1; i >= 0; i--) begin
      if (req_i[i].req) begin
        pick_ok = 1'b1;
        pick    = SW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      owner <= '0;
      cur   <= '0;
    end else begin
      unique case (state)
        S_T1: state <= S_T2;
        S_IDLE, S_T2: if (state == S_IDLE || bus_rdy) begin
          if (pick_ok) begin
            state <= S_T1;
            owner <= pick;
            cur   <= req_i[pick];
          end else begin
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i < NREQ; i++) begin
      rsp_o[i].ack   = done && owner == SW'(i);
      rsp_o[i].rdata = bus_rdata;
    end
  end

  assign bus_as    = state == S_T1;
  assign bus_cyc   = state != S_IDLE;
  assign bus_addr  = {cur.addr[31:2], 2'b00};
  assign bus_we    = cur.we;
  assign bus_be    = cur.be;
  assign bus_wdata = cur.wdata;

  // A requester keeps its request up until it is answered.
  for (genvar i = 0; i < NREQ; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      bus_cyc && owner == SW'(i) && !rsp_o[i].ack |-> req_i[i].req);
  end
endmodule
