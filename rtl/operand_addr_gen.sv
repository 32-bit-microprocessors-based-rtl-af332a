// operand_addr_gen: A-stage of the pipeline, operand address generation.
//
// Takes one A-code per clock from the D-stage and turns it into an F-code
// for the OF-stage: the operand's effective address, or the note that the
// operand is a register or an immediate value. The modes are those of the
// architecture:
//   AM_REG    Rn                     register operand, no address
//   AM_IMM    #exp                   immediate value passed on in addr
//   AM_IND    @Rn                    Rn
//   AM_DISP   @(exp, Rn)             Rn + exp        (16- or 32-bit exp)
//   AM_ABS    @exp                   exp             (16- or 32-bit exp)
//   AM_PCREL  @(exp, PC)             PC + exp
//   AM_POP    @SP+                   SP,        SP := SP + size
//   AM_PUSH   @-SP                   SP - size, SP := SP - size
//   AM_CHAIN  one step of chained addressing:
//             base + (Rx << scale if idx) + exp, where base is Rn, PC or 0
//             for the first step and the word read from memory at the
//             previous step's address for every later one.
// A chained mode is sent as a sequence of AM_CHAIN A-codes, every one but the
// last with more = 1. For such a step the unit reads the word at the step's
// address through its own bus port (one bus cycle, ev_indirect) and uses it
// as the base of the next step, which may be accepted in the clock the word
// arrives; only the last step yields an F-code. This
// gives the three primitives of chained addressing (addition, scaling and
// indirect reference) in any combination.
//
// Interface and timing: ac_valid/ac_ready and f_valid/f_ready are valid-ready
// handshakes. An accepted A-code gives its F-code in the next clock; an
// intermediate chained step instead occupies the unit until the clock in
// which its memory read is acknowledged. The base and index registers are read combinationally
// through rf_ra/rf_da (base, R15 for the stack modes) and rf_rb/rf_db
// (index). The D-stage must not send an A-code whose registers an older
// instruction has still to write, and the E-stage writes sp_new to R15 for
// the stack modes. flush drops the F-code held and any chained state; a
// memory read already on the bus is completed and its data discarded.
//
// The mode list, the chained primitives and the A-stage's place between the
// D- and OF-stages follow the document. The A-code and F-code formats, the
// step-per-A-code form of chained addressing, the register interlock left to
// the D-stage and the SP update through the E-stage are this design's own
// choices, since the instruction encoding and the stage interfaces are not
// published.
//
// Lint notes: rst_n is also the disable condition of the assertions; a linter
// reports that as a synchronous use of the asynchronous reset, while every
// flip-flop here resets asynchronously.
module operand_addr_gen
  import gm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic        ac_valid,
  input  acode_t      ac,
  output logic        ac_ready,
  output logic [3:0]  rf_ra,
  input  logic [31:0] rf_da,
  output logic [3:0]  rf_rb,
  input  logic [31:0] rf_db,
  output logic        f_valid,
  output fcode_t      f,
  input  logic        f_ready,
  output bus_req_t    bus_o,
  input  bus_rsp_t    bus_i,
  output logic        ev_indirect
);
  logic        pend, stale;       // chained-step memory read in progress
  logic [31:0] pend_addr;
  logic        chain_have;        // base of the next chained step is known
  logic [31:0] chain_base;

  assign rf_ra = (ac.mode == AM_POP || ac.mode == AM_PUSH) ? 4'd15 : ac.rn;
  assign rf_rb = ac.rx;

  // effective address of the A-code offered this clock
  logic [31:0] base, index, ea;
  fcode_t      fc;
  always_comb begin
    if (pend && bus_i.ack && !stale) base = bus_i.rdata;
    else if (chain_have)         base = chain_base;
    else if (ac.cbase == CB_REG) base = rf_da;
    else if (ac.cbase == CB_PC)  base = ac.pc;
    else                         base = '0;
    index = ac.idx ? (rf_db << ac.scale) : '0;

    fc = '0;
    fc.rn = ac.rn;
    fc.size = ac.size;
    fc.fetch = ac.fetch && ac.mode != AM_REG && ac.mode != AM_IMM;
    ea = '0;
    unique case (ac.mode)
      AM_REG:   fc.is_reg = 1'b1;
      AM_IMM:   begin fc.is_imm = 1'b1; ea = ac.disp; end
      AM_IND:   ea = rf_da;
      AM_DISP:  ea = rf_da + ac.disp;
      AM_ABS:   ea = ac.disp;
      AM_PCREL: ea = ac.pc + ac.disp;
      AM_POP:   begin ea = rf_da; fc.sp_we = 1'b1; fc.sp_new = rf_da + 32'(ac.size); end
      AM_PUSH:  begin ea = rf_da - 32'(ac.size); fc.sp_we = 1'b1; fc.sp_new = ea; end
      AM_CHAIN: ea = base + index + ac.disp;
      default:  ea = '0;
    endcase
    fc.addr = ea;
  end

  assign ac_ready = (!pend || bus_i.ack) && (!f_valid || f_ready);

  logic take, step;
  assign take = ac_valid && ac_ready && !flush;
  assign step = take && ac.mode == AM_CHAIN && ac.more;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_valid    <= 1'b0;
      f          <= '0;
      pend       <= 1'b0;
      stale      <= 1'b0;
      pend_addr  <= '0;
      chain_have <= 1'b0;
      chain_base <= '0;
    end else begin
      if (f_valid && f_ready) f_valid <= 1'b0;
      if (pend && bus_i.ack) begin
        pend  <= 1'b0;
        stale <= 1'b0;
        if (!stale && !flush) begin
          chain_have <= 1'b1;
          chain_base <= bus_i.rdata;
        end
      end
      if (take && !step) begin
        f_valid    <= 1'b1;
        f          <= fc;
        chain_have <= 1'b0;
      end
      if (step) begin
        pend       <= 1'b1;
        pend_addr  <= ea;
        chain_have <= 1'b0;
      end
      if (flush) begin
        f_valid    <= 1'b0;
        chain_have <= 1'b0;
        if (pend && !bus_i.ack) stale <= 1'b1;
      end
    end
  end

  // The request is held until its acknowledge and withdrawn in that clock.
  always_comb begin
    bus_o       = '0;
    bus_o.req   = pend && !bus_i.ack;
    bus_o.addr  = pend_addr;
    bus_o.be    = 4'hf;
  end

  assign ev_indirect = pend && bus_i.ack && !stale;

  assert property (@(posedge clk) disable iff (!rst_n) take && chain_have |-> ac.mode == AM_CHAIN)
    else $error("operand_addr_gen: chained mode interrupted by another mode");
endmodule
