// operand_fetch: OF-stage of the pipeline, operand fetch.
//
// Takes the F-codes of the A-stage and hands S-codes to the E-stage. For an
// operand that is read from memory (fetch = 1) the unit reads it through its
// own bus port and delivers it right-aligned and zero-extended in value. An
// operand of 1, 2 or 4 bytes may sit at any byte address: when it spans two
// aligned words (byte offset + size > 4) the unit reads both words in back-
// to-back bus cycles and joins them, most significant byte at the lower
// address (big-endian), and pulses ev_cross. A register operand, an immediate
// value (returned in value) and an operand that is only written (fetch = 0,
// only its address is needed) pass through without a bus cycle.
//
// Interface and timing: f_valid/f_ready and s_valid/s_ready are valid-ready
// handshakes. An S-code appears in the clock after its F-code was accepted
// when no read is needed, otherwise in the clock after the last read's
// acknowledge; the unit takes no new F-code while it reads. The request for
// the second word of a spanning operand is shown in the acknowledge clock of
// the first, so the two bus cycles follow without a gap. flush drops the
// S-code held; a read already on the bus is completed and discarded.
//
// The stage's task (fetch the operand named by the F-code) follows the
// document. The S-code format, zero extension, the two-read handling of
// unaligned operands and the separate bus port are this design's choices;
// the microinstruction fetch of this stage belongs to the microprogram and is
// not built.
//
// Lint notes: rst_n is also the disable condition of the assertions; a linter
// reports that as a synchronous use of the asynchronous reset, while every
// flip-flop here resets asynchronously. The is_reg, is_imm and fetch fields
// of the latched F-code cur are not read again, being known to be 0, 0 and 1
// while reading; the low half of the joined two-word value in extract() is
// shifted out by design.
module operand_fetch
  import gm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic        f_valid,
  input  fcode_t      f,
  output logic        f_ready,
  output logic        s_valid,
  output scode_t      s,
  input  logic        s_ready,
  output bus_req_t    bus_o,
  input  bus_rsp_t    bus_i,
  output logic        ev_cross
);
  typedef enum logic [1:0] {O_IDLE, O_RD0, O_RD1} ost_e;
  ost_e        st;
  fcode_t      cur;
  logic [31:0] w0;
  logic        stale;

  // does the operand being read span two words?
  logic spans;
  assign spans = ({2'b00, cur.addr[1:0]} + {1'b0, cur.size}) > 4'd4;

  // operand from the two words: shift out the leading bytes, keep size bytes
  function automatic logic [31:0] extract(input logic [31:0] a, input logic [31:0] b,
                                          input logic [1:0] off, input logic [2:0] size);
    logic [63:0] t;
    t = {a, b} << (8 * off);
    unique case (size)
      3'd1:    return {24'd0, t[63:56]};
      3'd2:    return {16'd0, t[63:48]};
      default: return t[63:32];
    endcase
  endfunction

  assign f_ready = st == O_IDLE && (!s_valid || s_ready);

  logic take, need_rd;
  assign take    = f_valid && f_ready && !flush;
  assign need_rd = f.fetch && !f.is_reg && !f.is_imm;

  // second word requested in the acknowledge clock of the first
  logic next_word;
  assign next_word = st == O_RD0 && bus_i.ack && spans && !stale && !flush;

  always_comb begin
    bus_o      = '0;
    bus_o.be   = 4'hf;
    bus_o.req  = ((st == O_RD0 || st == O_RD1) && !bus_i.ack) || next_word;
    bus_o.addr = (st == O_RD1 || next_word) ? {cur.addr[31:2], 2'b00} + 32'd4
                                           : {cur.addr[31:2], 2'b00};
  end

  scode_t sc_pass, sc_read;
  always_comb begin
    sc_pass        = '0;
    sc_pass.is_reg = f.is_reg;
    sc_pass.rn     = f.rn;
    sc_pass.addr   = f.addr;
    sc_pass.value  = f.is_imm ? f.addr : '0;
    sc_pass.sp_we  = f.sp_we;
    sc_pass.sp_new = f.sp_new;

    sc_read        = '0;
    sc_read.rn     = cur.rn;
    sc_read.addr   = cur.addr;
    sc_read.sp_we  = cur.sp_we;
    sc_read.sp_new = cur.sp_new;
    if (st == O_RD1) sc_read.value = extract(w0, bus_i.rdata, cur.addr[1:0], cur.size);
    else             sc_read.value = extract(bus_i.rdata, '0, cur.addr[1:0], cur.size);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= O_IDLE;
      cur     <= '0;
      w0      <= '0;
      stale   <= 1'b0;
      s_valid <= 1'b0;
      s       <= '0;
    end else begin
      if (s_valid && s_ready) s_valid <= 1'b0;
      unique case (st)
        O_IDLE: if (take) begin
          if (need_rd) begin
            st  <= O_RD0;
            cur <= f;
          end else begin
            s_valid <= 1'b1;
            s       <= sc_pass;
          end
        end
        O_RD0: if (bus_i.ack) begin
          if (next_word) begin
            st <= O_RD1;
            w0 <= bus_i.rdata;
          end else begin
            st <= O_IDLE;
            if (!stale && !flush) begin
              s_valid <= 1'b1;
              s       <= sc_read;
            end
          end
        end
        O_RD1: if (bus_i.ack) begin
          st <= O_IDLE;
          if (!stale && !flush) begin
            s_valid <= 1'b1;
            s       <= sc_read;
          end
        end
        default: st <= O_IDLE;
      endcase
      if (st != O_IDLE && bus_i.ack && !next_word) stale <= 1'b0;
      if (flush) begin
        s_valid <= 1'b0;
        if (st != O_IDLE && !(bus_i.ack && !next_word)) stale <= 1'b1;
      end
    end
  end

  assign ev_cross = st == O_RD1 && bus_i.ack && !stale;

  assert property (@(posedge clk) disable iff (!rst_n)
    f_valid && f.fetch && !f.is_reg && !f.is_imm |-> f.size inside {3'd1, 3'd2, 3'd4})
    else $error("operand_fetch: operand size must be 1, 2 or 4 bytes");
endmodule
