// ifetch_unit: IF-stage of the pipeline.
//
// Keeps the instruction queue filled. Each time the queue has room for the
// next fetch word, the unit first looks the word up in the branch buffer; on
// a hit the word goes into the queue in the same clock with no bus cycle. On
// a miss it requests a read from the bus interface and writes the returned
// word into the queue. A word fetched from memory is also written into the
// branch buffer when the queue is empty at that moment (this is the first
// word at a jump target, after a flush) or, with bb_general = 1, always (the
// branch buffer used as a general instruction cache).
//
// redirect (a pre-jump from the D-stage or a flush from the E-stage) empties
// the queue and restarts fetch at redirect_pc. A bus read already under way
// cannot be withdrawn: its word is discarded when it arrives.
//
// D-stage side: d_data / d_count are the queue head (see instr_queue), d_pc
// is the address of the oldest halfword in it, and d_take removes halfwords.
// Bus side: one bus_req_t / bus_rsp_t requester port. Events ev_* pulse for
// one clock. The buffering scheme follows the document; the fill rule in
// detail and the one-request-at-a-time fetch are this design's choices.
//
// Lint notes: rst_n also reaches the assertions of the sub-units as their
// disable condition; a linter reports that as a synchronous use of the
// asynchronous reset, while every flip-flop resets asynchronously.
module ifetch_unit
  import gm_pkg::*;
#(
  parameter int unsigned QUEUE_BYTES = 16,
  parameter int unsigned BB_ENTRIES  = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        redirect,
  input  logic [31:0] redirect_pc,
  input  logic        bb_general,
  input  logic        bb_inv,
  output bus_req_t    bus_o,
  input  bus_rsp_t    bus_i,
  output logic [63:0] d_data,
  output logic [2:0]  d_count,
  output logic [31:0] d_pc,
  input  logic [2:0]  d_take,
  output logic        ev_bb_hit,
  output logic        ev_bb_fill,
  output logic        ev_queue_full
);
  localparam int unsigned SLOTS = QUEUE_BYTES / 2;

  logic [31:0] fpc;        // word address of the next fetch
  logic        lo_only;    // next word enters with its low halfword only
  logic        pend, stale;
  logic [31:0] pend_addr;
  logic [31:0] head_pc;

  logic [$clog2(SLOTS):0] free;
  logic        room, qempty;
  logic        bb_hit;
  logic [31:0] bb_data;
  logic        q_wr, q_lo;
  logic [31:0] q_wdata;

  assign room   = free >= (lo_only ? 1 : 2);
  assign qempty = free == ($clog2(SLOTS)+1)'(SLOTS);

  branch_buffer #(.ENTRIES(BB_ENTRIES)) u_bb (
    .clk, .rst_n, .inv(bb_inv),
    .lk_addr(fpc), .lk_hit(bb_hit), .lk_data(bb_data),
    .wr_en  (ev_bb_fill),
    .wr_addr(pend_addr),
    .wr_data(bus_i.rdata)
  );

  instr_queue #(.BYTES(QUEUE_BYTES)) u_q (
    .clk, .rst_n, .flush(redirect),
    .wr_en(q_wr), .wr_lo_only(q_lo), .wr_data(q_wdata),
    .free, .rd_data(d_data), .rd_count(d_count), .rd_take(d_take)
  );

  logic from_bus, from_bb;
  always_comb begin
    from_bus = !redirect && pend && bus_i.ack && !stale;
    from_bb  = !redirect && !pend && room && bb_hit;
    q_wr     = from_bus || from_bb;
    q_lo     = lo_only;
    q_wdata  = from_bus ? bus_i.rdata : bb_data;
  end

  assign ev_bb_hit     = from_bb;
  assign ev_bb_fill    = from_bus && (qempty || bb_general);
  assign ev_queue_full = !redirect && !pend && !room;

  assign bus_o.req   = pend && !bus_i.ack;
  assign bus_o.we    = 1'b0;
  assign bus_o.be    = 4'hf;
  assign bus_o.addr  = pend_addr;
  assign bus_o.wdata = '0;
  assign d_pc        = head_pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fpc       <= '0;
      lo_only   <= 1'b0;
      pend      <= 1'b0;
      stale     <= 1'b0;
      pend_addr <= '0;
      head_pc   <= '0;
    end else begin
      if (pend && bus_i.ack) begin
        pend  <= 1'b0;
        stale <= 1'b0;
      end
      if (redirect) begin
        fpc     <= {redirect_pc[31:2], 2'b00};
        lo_only <= redirect_pc[1];
        head_pc <= redirect_pc;
        if (pend && !bus_i.ack) stale <= 1'b1;
      end else begin
        head_pc <= head_pc + {28'd0, d_take, 1'b0};
        if (q_wr) begin
          fpc     <= fpc + 32'd4;
          lo_only <= 1'b0;
        end else if (!pend && room && !bb_hit) begin
          pend      <= 1'b1;
          pend_addr <= fpc;
        end
      end
    end
  end
endmodule
