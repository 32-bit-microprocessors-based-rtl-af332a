// bitmap_engine: execution sequence of the variable-length bit field
// (bitmap) instructions BVMAP / BVCPY and of the bit search BVSCH.
//
// A bit line is given by a word-aligned base address, a bit offset and a
// length in bits. Bits are numbered big-endian: bit 0 is the MSB of the byte
// at the base address, so bit i of a 32-bit word is data[31-i].
//
// BVMAP (mode 0) combines each source bit with the matching destination bit
// through a logical function and stores the result in the destination:
// D[doff+i] = f(S[soff+i], D[doff+i]) for i = 0 .. len-1. f is a 4-bit truth
// table indexed by {source bit, destination bit} (1100 is a copy, which is
// BVCPY). Bits of the destination words outside the field are written back
// unchanged. The destination is processed one 32-bit block at a time, either
// forward from the head or backward from the tail (dir = 1), so that an
// overlapping source and destination can be handled.
//
// Each block runs the micro-operation loop OP1..OP8: shift the current
// source block left (OP1), fetch the next source block (OP2), shift it right
// (OP3), keep it for the next block (OP4), OR the two into the aligned block
// T (OP5), fetch the destination block D (OP6), apply the function (OP7) and
// store the result (OP8). As in the document, the loop is software-pipelined
// into three steps, each holding one memory access, so the bus is kept busy
// (the store of step 2 is handed to the store buffer in the clock the fetch
// of step 1 completes, and reads are chained, so bus cycles follow each
// other without a gap):
//   step 1: OP7(n-1) and OP1, OP2(n)   fetch next source block
//   step 2: OP8(n-1) and OP3, OP4(n)   store previous result
//   step 3: OP5, OP6(n)                fetch destination block
// One source block is fetched ahead of the loop. A field covering N
// destination words therefore takes 3N + 1 memory accesses. Stores go into the
// store buffer so that the next step can start while the write runs.
//
// BVSCH (mode 1) scans the field forward a word at a time for the first bit
// that is 1 and returns its bit offset from the base (found_off); found = 0
// if there is none.
//
// Interface: start with the operands latched from the inputs; busy until the
// done pulse. Reads go through a bus requester port (rd_o / rd_i), writes to
// the store buffer (sb_wr, waits while sb_full). ev_word pulses per
// destination block (BVMAP) or searched word (BVSCH).
// The operation of the instructions and the three-step loop follow the
// document. Word-aligned base addresses, the function-code table, and using
// the alignment shift through the barrel shifter are this design's choices;
// BVSCH here searches forward only.
//
// Lint notes: The carry-out outputs of the two shifters (sh_co_l, sh_co_r)
// are left unconnected in use: the bit stream needs only the shifted words.
module bitmap_engine
  import gm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        mode,       // 0: BVMAP / BVCPY, 1: BVSCH
  input  logic        dir,        // 0: forward, 1: backward (BVMAP)
  input  logic [3:0]  func,
  input  logic [31:0] src_base,
  input  logic [31:0] src_off,
  input  logic [31:0] dst_base,
  input  logic [31:0] dst_off,
  input  logic [31:0] len,
  output logic        busy,
  output logic        done,
  output logic        found,
  output logic [31:0] found_off,
  output bus_req_t    rd_o,
  input  bus_rsp_t    rd_i,
  output logic        sb_wr,
  output logic [31:0] sb_addr,
  output logic [31:0] sb_data,
  input  logic        sb_full,
  output logic        ev_word
);
  typedef enum logic [2:0] {
    B_IDLE, B_PRIME, B_S1, B_S2, B_S3, B_LAST, B_SCH, B_DONE
  } st_e;
  st_e st;

  logic               r_dir;
  logic [3:0]         r_func;
  logic [31:0]        r_sbase, r_dbase;
  logic [4:0]         k;            // alignment shift
  logic signed [31:0] w, w0, wn;    // destination (or search) word index
  logic signed [31:0] q;            // source word index (left word)
  logic [4:0]         lo0, hin;     // first bit of the first word, last bit of the last word
  logic [31:0]        sa, sbw;      // left and right source words
  logic               have_prev;
  logic [31:0]        prev_data, prev_addr;

  // --- combinational helpers ------------------------------------------------
  logic [31:0] mask_w, t_blk, f_blk, d_new, sh_l, sh_r;
  logic        sh_co_l, sh_co_r;  // carry outs, not needed here

  function automatic logic [31:0] word_mask(input logic first, input logic last,
                                            input logic [4:0] lo, input logic [4:0] hi);
    logic [5:0]  l, h;
    logic [31:0] ones;
    ones = '1;
    l = first ? {1'b0, lo} : 6'd0;
    h = last ? ({1'b0, hi} + 6'd1) : 6'd32;
    return (ones >> l) & ~((h == 6'd32) ? 32'd0 : (ones >> h));
  endfunction

  function automatic logic [5:0] first_one(input logic [31:0] v);
    first_one = 6'd32;
    for (int i = 0; i < 32; i++) if (v[i]) first_one = 6'(31 - i);
  endfunction

  // OP1 and OP3: align source blocks with the barrel shifter
  barrel_shifter u_shl (.op(SH_SHL), .a(sa),  .amt(k),           .y(sh_l), .co(sh_co_l));
  barrel_shifter u_shr (.op(SH_SHR), .a(sbw), .amt(5'd0 - k),    .y(sh_r), .co(sh_co_r));

  always_comb begin
    mask_w = word_mask(w == w0, w == wn, lo0, hin);
    t_blk  = (k == 5'd0) ? sa : (sh_l | sh_r);                   // OP5
    for (int i = 0; i < 32; i++) f_blk[i] = r_func[{t_blk[i], rd_i.rdata[i]}];  // OP7
    d_new  = (f_blk & mask_w) | (rd_i.rdata & ~mask_w);
  end

  // --- memory ports -----------------------------------------------------------
  logic [31:0] src_addr_l, src_addr_r, dst_addr, sch_addr;
  assign src_addr_l = r_sbase + {q[29:0], 2'b00};
  assign src_addr_r = r_sbase + {q[29:0] + 30'd1, 2'b00};
  assign dst_addr   = r_dbase + {w[29:0], 2'b00};
  assign sch_addr   = r_sbase + {w[29:0], 2'b00};

  // In the clock of an ack the port already shows the next read of the
  // sequence (if the next step is a read), so that reads follow each other on
  // the bus without a gap.
  logic [5:0]  fo;            // first 1 bit of the word read (BVSCH)
  assign fo = first_one(rd_i.rdata & mask_w);
  logic [31:0] src_addr_next;
  logic        last_w;
  assign src_addr_next = r_dir ? r_sbase + {q[29:0] - 30'd1, 2'b00}
                               : r_sbase + {q[29:0] + 30'd2, 2'b00};
  assign last_w = (w == (r_dir ? w0 : wn));

  always_comb begin
    rd_o     = '0;
    rd_o.be  = 4'hf;
    if (!rd_i.ack) begin
      rd_o.req = st inside {B_PRIME, B_S1, B_S3, B_SCH};
      unique case (st)
        B_PRIME: rd_o.addr = r_dir ? src_addr_r : src_addr_l;
        B_S1:    rd_o.addr = r_dir ? src_addr_l : src_addr_r;
        B_S3:    rd_o.addr = dst_addr;
        B_SCH:   rd_o.addr = sch_addr;
        default: rd_o.addr = '0;
      endcase
    end else begin
      unique case (st)
        B_PRIME: begin rd_o.req = 1'b1; rd_o.addr = r_dir ? src_addr_l : src_addr_r; end
        B_S1:    begin rd_o.req = !have_prev; rd_o.addr = dst_addr; end
        B_S3:    begin rd_o.req = !last_w; rd_o.addr = src_addr_next; end
        B_SCH:   begin rd_o.req = fo == 6'd32 && w != wn; rd_o.addr = sch_addr + 32'd4; end
        default: ;
      endcase
    end
  end

  assign sb_wr   = ((st == B_S1 && rd_i.ack) || st == B_S2 || st == B_LAST) && have_prev && !sb_full;
  assign sb_addr = prev_addr;
  assign sb_data = prev_data;
  assign busy    = st != B_IDLE;
  assign ev_word = (st == B_S3 || st == B_SCH) && rd_i.ack;

  // --- operand set-up --------------------------------------------------------
  logic signed [33:0] sdelta, src_pos;
  logic [31:0]        d_end, s_end;
  logic signed [31:0] w_first, w_last, s_first, s_last;
  always_comb begin
    d_end   = dst_off + len - 32'd1;
    s_end   = src_off + len - 32'd1;
    w_first = signed'({5'd0, dst_off[31:5]});
    w_last  = signed'({5'd0, d_end[31:5]});
    s_first = signed'({5'd0, src_off[31:5]});
    s_last  = signed'({5'd0, s_end[31:5]});
    sdelta  = signed'({2'b00, src_off}) - signed'({2'b00, dst_off});
    src_pos = sdelta + 34'(dir ? {w_last, 5'd0} : {w_first, 5'd0});
  end


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= B_IDLE;
      r_dir <= 1'b0; r_func <= '0; r_sbase <= '0; r_dbase <= '0;
      k <= '0; w <= '0; w0 <= '0; wn <= '0; q <= '0; lo0 <= '0; hin <= '0;
      sa <= '0; sbw <= '0; have_prev <= 1'b0; prev_data <= '0; prev_addr <= '0;
      done <= 1'b0; found <= 1'b0; found_off <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        B_IDLE: if (start) begin
          r_dir     <= dir && !mode;
          r_func    <= func;
          r_sbase   <= src_base;
          r_dbase   <= dst_base;
          have_prev <= 1'b0;
          found     <= 1'b0;
          found_off <= '0;
          if (len == 0) begin
            st <= B_DONE;
          end else if (mode) begin
            w0  <= s_first;
            wn  <= s_last;
            w   <= s_first;
            lo0 <= src_off[4:0];
            hin <= s_end[4:0];
            st  <= B_SCH;
          end else begin
            w0  <= w_first;
            wn  <= w_last;
            w   <= dir ? w_last : w_first;
            lo0 <= dst_off[4:0];
            hin <= d_end[4:0];
            k   <= sdelta[4:0];
            q   <= 32'(src_pos >>> 5);   // floor(src_pos / 32)
            st  <= B_PRIME;
          end
        end
        B_PRIME: if (rd_i.ack) begin
          if (r_dir) sbw <= rd_i.rdata; else sa <= rd_i.rdata;
          st <= B_S1;
        end
        B_S1: if (rd_i.ack) begin                 // OP2 (and OP1, OP7(n-1))
          if (r_dir) sa <= rd_i.rdata; else sbw <= rd_i.rdata;
          st <= (have_prev && sb_full) ? B_S2 : B_S3;
        end
        B_S2: if (!sb_full) st <= B_S3;           // store buffer was busy: OP8(n-1)
        B_S3: if (rd_i.ack) begin                 // OP5, OP6; OP7 result kept
          prev_data <= d_new;
          prev_addr <= dst_addr;
          have_prev <= 1'b1;
          if (r_dir) begin sbw <= sa; q <= q - 1; w <= w - 1; end
          else       begin sa <= sbw; q <= q + 1; w <= w + 1; end
          st <= last_w ? B_LAST : B_S1;
        end
        B_LAST: if (!sb_full) st <= B_DONE;       // OP8 of the last block
        B_SCH: if (rd_i.ack) begin
          if (fo != 6'd32) begin
            found     <= 1'b1;
            found_off <= {w[26:0], 5'd0} + 32'(fo);
            st        <= B_DONE;
          end else if (w == wn) begin
            st <= B_DONE;
          end else begin
            w <= w + 1;
          end
        end
        B_DONE: begin
          done <= 1'b1;
          st   <= B_IDLE;
        end
        default: st <= B_IDLE;
      endcase
    end
  end
endmodule
