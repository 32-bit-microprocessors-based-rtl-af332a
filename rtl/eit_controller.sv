// eit_controller: selection of the next EIT (exception, interrupt, trap)
// and its vector.
//
// Sources, highest priority first:
//   reset                               vector 00h
//   an exception or trap from execution vector supplied by the E-stage
//                                       (for example 1Ah zero divide, 20h+n TRAPA n)
//   an external interrupt of level n    vector 40h+n, or the vector read from
//                                       the bus (80h..FCh) when int_vectored = 1
//   a delayed interrupt of level n      vector 50h+n
// Interrupt levels run from 0 (most urgent) to 14. An interrupt of level n is
// accepted only if n is below the IMASK field of the PSW; otherwise it stays
// pending. The delayed interrupt is requested by software writing a level
// into the DIR register kept here (15 = no request); it waits until IMASK
// allows it and is cleared when it is taken. Between an external and a
// delayed interrupt the lower level wins, the external one on a tie.
//
// eit_req/eit_vec/eit_addr are combinational; eit_addr = EITVB + 8 * vector
// is the entry of the EIT vector table the processor reads next. The E-stage
// acknowledges with eit_ack in the clock it starts EIT processing.
// The vector numbers, their table offsets and the IMASK rule follow the
// document; the level encoding, the priority order and DIR = 15 meaning
// "none" are this design's choices.
module eit_controller
  import gm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reset_req,
  input  logic        exc_req,
  input  logic [7:0]  exc_vec,
  input  logic        int_req,
  input  logic [3:0]  int_level,
  input  logic        int_vectored,
  input  logic [7:0]  int_vector,
  input  logic [3:0]  imask,
  input  logic [31:0] eitvb,
  input  logic        dir_we,
  input  logic [3:0]  dir_wdata,
  output logic [3:0]  dir_q,
  output logic        eit_req,
  output logic [7:0]  eit_vec,
  output logic [31:0] eit_addr,
  input  logic        eit_ack
);
  logic int_ok, di_ok, take_di;

  assign int_ok = int_req && int_level != 4'hf && int_level < imask;
  assign di_ok  = dir_q != 4'hf && dir_q < imask;

  always_comb begin
    take_di = 1'b0;
    eit_req = 1'b1;
    if (reset_req)      eit_vec = VEC_RESET;
    else if (exc_req)   eit_vec = exc_vec;
    else if (int_ok && !(di_ok && dir_q < int_level))
      eit_vec = int_vectored ? int_vector : VEC_INT0 + {4'd0, int_level};
    else if (di_ok) begin
      eit_vec = VEC_DI0 + {4'd0, dir_q};
      take_di = 1'b1;
    end else begin
      eit_vec = '0;
      eit_req = 1'b0;
    end
    eit_addr = eitvb + {21'd0, eit_vec, 3'b000};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dir_q <= 4'hf;
    else if (eit_ack && take_di) dir_q <= 4'hf;
    else if (dir_we) dir_q <= dir_wdata;
  end
endmodule
