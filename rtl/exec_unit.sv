// exec_unit: E-stage of the pipeline.
//
// Executes one micro-operation at a time, as supplied by the microprogram
// sequencer, on the register file, the 32-bit ALU, the 32-bit barrel shifter
// and the bitmap engine:
//   U_ALU    rd = rs1 op (rs2 or imm), flags updated                 1 clock
//   U_SHIFT  rd = rs1 shifted by (rs2 or imm)[4:0], flags z, n, c    1 clock
//   U_LOAD   rd = word at rs1 + imm, through the operand bus port    until ack
//   U_STORE  word rs2 to rs1 + imm, handed to the store buffer       1 clock
//                                                     (waits while it is full)
//   U_BVMAP  bitmap operation with R0 = source base, R1 = source bit offset,
//            R2 = destination base, R3 = destination bit offset, R4 = length,
//            function and direction from the micro-operation         until done
//   U_BVSCH  search R0/R1/R4 for the first 1 bit; R1 = its offset,
//            flag z = 1 when none was found                          until done
// uop_valid/uop_ready form a valid-ready handshake: a micro-operation is
// taken in a clock where both are 1. The register file's two read ports for
// the A-stage (ag_ra/ag_rd) are brought out unchanged. Because stores go to
// the store buffer, following micro-operations run while the write cycle
// is still on the bus.
//
// The units and the store-buffer behaviour follow the document. The
// micro-operation format, the register assignment of the bitmap operands and
// the flag rules are this design's choices, since the microprogram is not
// published.
//
// Lint notes: The register file's sp_sel output and the bitmap engine's busy
// output are not needed inside this unit: the engine's done pulse ends a
// bitmap operation.
module exec_unit
  import gm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  ring,
  input  logic        int_mode,
  input  logic        uop_valid,
  input  uop_t        uop,
  output logic        uop_ready,
  output flags_t      flags,
  // operand read port and store buffer
  output bus_req_t    op_o,
  input  bus_rsp_t    op_i,
  output logic        sb_wr,
  output logic [31:0] sb_addr,
  output logic [31:0] sb_data,
  input  logic        sb_full,
  input  logic        sb_empty,
  // register reads of the A-stage, and a debug read
  input  logic [3:0]  ag_ra [2],
  output logic [31:0] ag_rd [2],
  input  logic [3:0]  dbg_ra,
  output logic [31:0] dbg_rd,
  output logic        ev_sb_overlap,
  output logic        ev_sb_stall,
  output logic        ev_bv_word
);
  typedef enum logic [1:0] {E_RUN, E_LOAD, E_BV} est_e;
  est_e est;

  // register file: port A for rs1 (or debug when idle-free), port B for rs2
  logic [3:0]  ra, rb, wa;
  logic [31:0] va, vb, wd;
  logic        we;
  logic [2:0]  sp_sel;    // not needed here
  logic [31:0] rlow [5];  // R0..R4: bitmap operands

  gpr_file u_rf (
    .clk, .rst_n, .ring, .int_mode,
    .ra, .rd_a(va), .rb, .rd_b(vb),
    .we, .wa, .wd, .sp_sel, .r0_r4(rlow), .ag_ra, .ag_rd, .dbg_ra, .dbg_rd
  );

  logic [31:0] opb, alu_y, sh_y;
  flags_t      alu_f;
  logic        sh_co;

  assign ra  = uop.rs1;
  assign rb  = uop.rs2;
  assign opb = uop.use_imm ? uop.imm : vb;

  alu32 u_alu (.op(uop.alu), .a(va), .b(opb), .cin(flags.c), .y(alu_y), .flags(alu_f));
  barrel_shifter u_sh (.op(uop.sh), .a(va), .amt(opb[4:0]), .y(sh_y), .co(sh_co));

  // bitmap engine
  logic        bv_start, bv_busy, bv_done, bv_found;
  logic [31:0] bv_off;
  bus_req_t    bv_rd;
  logic        bv_sb_wr;
  logic [31:0] bv_sb_addr, bv_sb_data;
  logic        uop_is_bv;
  assign uop_is_bv = uop.kind == U_BVMAP || uop.kind == U_BVSCH;

  bitmap_engine u_bv (
    .clk, .rst_n,
    .start(bv_start), .mode(uop.kind == U_BVSCH), .dir(uop.bv_dir), .func(uop.bv_func),
    .src_base(rlow[0]), .src_off(rlow[1]), .dst_base(rlow[2]), .dst_off(rlow[3]), .len(rlow[4]),
    .busy(bv_busy), .done(bv_done), .found(bv_found), .found_off(bv_off),
    .rd_o(bv_rd), .rd_i(op_i),
    .sb_wr(bv_sb_wr), .sb_addr(bv_sb_addr), .sb_data(bv_sb_data), .sb_full,
    .ev_word(ev_bv_word)
  );

  logic        bv_sch;
  logic [3:0]  ld_rd;
  logic [31:0] ld_addr;

  logic run_fire;
  assign run_fire = est == E_RUN && uop_valid && !(uop.kind == U_STORE && sb_full);
  assign uop_ready = est == E_RUN && !(uop.kind == U_STORE && sb_full);
  assign bv_start  = run_fire && uop_is_bv;

  always_comb begin
    op_o = '0;
    if (est == E_LOAD) begin
      op_o.req  = !op_i.ack;
      op_o.be   = 4'hf;
      op_o.addr = ld_addr;
    end else if (est == E_BV) begin
      op_o = bv_rd;
    end
  end

  always_comb begin
    sb_wr   = 1'b0;
    sb_addr = va + uop.imm;
    sb_data = vb;
    if (est == E_BV) begin
      sb_wr   = bv_sb_wr;
      sb_addr = bv_sb_addr;
      sb_data = bv_sb_data;
    end else if (run_fire && uop.kind == U_STORE) begin
      sb_wr = 1'b1;
    end
  end

  always_comb begin
    we = 1'b0;
    wa = uop.rd;
    wd = alu_y;
    if (est == E_LOAD && op_i.ack) begin
      we = 1'b1; wa = ld_rd; wd = op_i.rdata;
    end else if (est == E_BV && bv_done && bv_found) begin
      we = 1'b1; wa = 4'd1; wd = bv_off;
    end else if (run_fire && uop.kind == U_ALU && uop.alu != ALU_CMP) begin
      we = 1'b1; wd = alu_y;
    end else if (run_fire && uop.kind == U_SHIFT) begin
      we = 1'b1; wd = sh_y;
    end
  end

  assign ev_sb_overlap = run_fire && uop.kind != U_NOP && !sb_empty && uop.kind != U_STORE;
  assign ev_sb_stall   = est == E_RUN && uop_valid && uop.kind == U_STORE && sb_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est     <= E_RUN;
      flags   <= '0;
      ld_rd   <= '0;
      ld_addr <= '0;
      bv_sch  <= 1'b0;
    end else begin
      unique case (est)
        E_RUN: if (run_fire) begin
          unique case (uop.kind)
            U_ALU:   flags <= alu_f;
            U_SHIFT: flags <= '{z: sh_y == '0, n: sh_y[31], v: 1'b0, c: sh_co};
            U_LOAD:  begin est <= E_LOAD; ld_rd <= uop.rd; ld_addr <= va + uop.imm; end
            U_BVMAP, U_BVSCH: begin est <= E_BV; bv_sch <= uop.kind == U_BVSCH; end
            default: ;
          endcase
        end
        E_LOAD: if (op_i.ack) est <= E_RUN;
        E_BV: if (bv_done) begin
          est <= E_RUN;
          if (bv_sch) flags.z <= !bv_found;
        end
        default: est <= E_RUN;
      endcase
    end
  end
endmodule
