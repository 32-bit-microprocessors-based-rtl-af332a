// gmicro100_top: the pipeline of a G/100-style TRON processor around its
// instruction-decode and microprogram blocks.
//
// The five-stage pipeline IF - D - A - OF - E is built here as far as its
// hardware is specified: the IF-stage (16-byte instruction queue and 256-byte
// branch buffer), the pre-jump logic of the D-stage (PC adder, 1 x 256
// branch history table, 8-entry PC stack) with its check in the E-stage, the
// A-stage operand address generator, the OF-stage operand fetch, the E-stage
// datapath (registers, ALU, barrel shifter, bitmap engine) with its 4-byte
// store buffer, the EIT controller, and the bus interface that shares the
// 32-bit external bus between store buffer, E-stage operand reads, OF-stage
// operand reads, A-stage indirect reads and instruction fetch, in that
// priority.
//
// The instruction decoder (D-stage decode and the second decode in the
// A-stage) and the microprogram ROM with its sequencer are outside this
// module, because their encodings are not published. Their signals are ports:
//   * q_data/q_count/q_pc/q_take: the head of the instruction queue, read and
//     consumed by the decoder;
//   * d_*: a decoded control transfer presented to the pre-jump logic, which
//     answers at once with d_pred/d_pret/d_pc1 to be carried down the pipe;
//   * e_*: the same instruction reaching the E-stage with its real outcome
//     (and, for a return, PC2 read from the stack); flush tells the outside
//     pipeline to drop everything younger;
//   * ac_*: A-codes from the decoder to the A-stage, which computes the
//     operand address (F-code, passed inside to the OF-stage) from registers
//     it reads in the register file; s_*: the S-codes of the OF-stage, the
//     fetched operands, for the microprogram sequencer; flush clears both
//     stages;
//   * uop_*: micro-operations for the E-stage datapath.
// An E-stage flush has priority over a D-stage pre-jump in the same clock.
// Instruction fetch starts at address 0 after reset.
//
// The block split and the stage functions follow the document; the port
// lists between blocks are this design's choices.
//
// Lint notes: rst_n also reaches the assertions of the sub-units as their
// disable condition; a linter reports that as a synchronous use of the
// asynchronous reset, while every flip-flop resets asynchronously.
module gmicro100_top
  import gm_pkg::*;
#(
  parameter int unsigned QUEUE_BYTES = 16,
  parameter int unsigned BB_ENTRIES  = 64,
  parameter int unsigned BPT_ENTRIES = 256,
  parameter int unsigned PCS_DEPTH   = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // external bus
  output logic        bus_as,
  output logic        bus_cyc,
  output logic [31:0] bus_addr,
  output logic        bus_we,
  output logic [3:0]  bus_be,
  output logic [31:0] bus_wdata,
  input  logic [31:0] bus_rdata,
  input  logic        bus_rdy,
  // processor state (PSW fields and control registers)
  input  logic [1:0]  ring,
  input  logic        int_mode,
  input  logic [3:0]  imask,
  input  logic [31:0] eitvb,
  input  logic        bb_general,
  input  logic        bb_inv,
  // instruction queue to the decoder
  output logic [63:0] q_data,
  output logic [2:0]  q_count,
  output logic [31:0] q_pc,
  input  logic [2:0]  q_take,
  // D-stage pre-jump
  input  logic        d_valid,
  input  ctrl_kind_e  d_kind,
  input  logic [31:0] d_pc,
  input  logic [31:0] d_disp,
  input  logic [3:0]  d_len,
  output logic        d_pred,
  output logic        d_pret,
  output logic [31:0] d_pc1,
  // E-stage check
  input  logic        e_valid,
  input  ctrl_kind_e  e_kind,
  input  logic [31:0] e_pc,
  input  logic [31:0] e_disp,
  input  logic [3:0]  e_len,
  input  logic        e_taken,
  input  logic        e_pred,
  input  logic        e_pret,
  input  logic [31:0] e_pc1,
  input  logic [31:0] e_pc2,
  output logic        flush,
  // A-stage
  input  logic        ac_valid,
  input  acode_t      ac,
  output logic        ac_ready,
  output logic        s_valid,
  output scode_t      s,
  input  logic        s_ready,
  // E-stage micro-operations
  input  logic        uop_valid,
  input  uop_t        uop,
  output logic        uop_ready,
  output flags_t      flags,
  input  logic [3:0]  dbg_ra,
  output logic [31:0] dbg_rd,
  // EIT
  input  logic        reset_req,
  input  logic        exc_req,
  input  logic [7:0]  exc_vec,
  input  logic        int_req,
  input  logic [3:0]  int_level,
  input  logic        int_vectored,
  input  logic [7:0]  int_vector,
  input  logic        dir_we,
  input  logic [3:0]  dir_wdata,
  output logic [3:0]  dir_q,
  output logic        eit_req,
  output logic [7:0]  eit_vec,
  output logic [31:0] eit_addr,
  input  logic        eit_ack,
  // monitoring
  output events_t     ev
);
  bus_req_t breq [5];
  bus_rsp_t brsp [5];
  logic        f_valid, f_ready;
  fcode_t      f;
  logic [3:0]  ag_ra [2];
  logic [31:0] ag_rd [2];

  logic        pj_redirect;
  logic [31:0] pj_target, flush_target;
  logic        redirect;
  logic [31:0] redirect_pc;

  logic        sb_wr, sb_full, sb_empty;
  logic [31:0] sb_addr, sb_data;

  assign redirect    = flush || pj_redirect;
  assign redirect_pc = flush ? flush_target : pj_target;

  bus_interface #(.NREQ(5)) u_biu (
    .clk, .rst_n,
    .req_i(breq), .rsp_o(brsp),
    .bus_as, .bus_cyc, .bus_addr, .bus_we, .bus_be, .bus_wdata, .bus_rdata, .bus_rdy
  );

  ifetch_unit #(.QUEUE_BYTES(QUEUE_BYTES), .BB_ENTRIES(BB_ENTRIES)) u_if (
    .clk, .rst_n,
    .redirect, .redirect_pc, .bb_general, .bb_inv,
    .bus_o(breq[4]), .bus_i(brsp[4]),
    .d_data(q_data), .d_count(q_count), .d_pc(q_pc), .d_take(q_take),
    .ev_bb_hit(ev.bb_hit), .ev_bb_fill(ev.bb_fill), .ev_queue_full(ev.queue_full)
  );

  prejump_unit #(.BPT_ENTRIES(BPT_ENTRIES), .PCS_DEPTH(PCS_DEPTH)) u_pj (
    .clk, .rst_n,
    .d_valid, .d_kind, .d_pc, .d_disp, .d_len,
    .d_redirect(pj_redirect), .d_target(pj_target), .d_pred, .d_pret, .d_pc1,
    .e_valid, .e_kind, .e_pc, .e_disp, .e_len, .e_taken, .e_pred, .e_pret, .e_pc1, .e_pc2,
    .flush, .flush_target,
    .ev_prebranch(ev.prebranch), .ev_mispredict(ev.mispredict),
    .ev_preret_hit(ev.preret_hit), .ev_preret_miss(ev.preret_miss)
  );

  operand_addr_gen u_ag (
    .clk, .rst_n, .flush,
    .ac_valid, .ac, .ac_ready,
    .rf_ra(ag_ra[0]), .rf_da(ag_rd[0]), .rf_rb(ag_ra[1]), .rf_db(ag_rd[1]),
    .f_valid, .f, .f_ready,
    .bus_o(breq[3]), .bus_i(brsp[3]),
    .ev_indirect(ev.a_indirect)
  );

  operand_fetch u_of (
    .clk, .rst_n, .flush,
    .f_valid, .f, .f_ready,
    .s_valid, .s, .s_ready,
    .bus_o(breq[2]), .bus_i(brsp[2]),
    .ev_cross(ev.of_cross)
  );

  store_buffer u_sb (
    .clk, .rst_n,
    .wr_en(sb_wr), .wr_addr(sb_addr), .wr_be(4'hf), .wr_data(sb_data),
    .full(sb_full), .empty(sb_empty),
    .bus_o(breq[0]), .bus_i(brsp[0])
  );

  exec_unit u_ex (
    .clk, .rst_n, .ring, .int_mode,
    .uop_valid, .uop, .uop_ready, .flags,
    .op_o(breq[1]), .op_i(brsp[1]),
    .sb_wr, .sb_addr, .sb_data, .sb_full, .sb_empty,
    .ag_ra, .ag_rd, .dbg_ra, .dbg_rd,
    .ev_sb_overlap(ev.sb_overlap), .ev_sb_stall(ev.sb_stall), .ev_bv_word(ev.bv_word)
  );

  eit_controller u_eit (
    .clk, .rst_n,
    .reset_req, .exc_req, .exc_vec, .int_req, .int_level, .int_vectored, .int_vector,
    .imask, .eitvb, .dir_we, .dir_wdata, .dir_q,
    .eit_req, .eit_vec, .eit_addr, .eit_ack
  );
endmodule
