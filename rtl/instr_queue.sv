// instr_queue: 16-byte instruction queue between the IF-stage and the
// D-stage.
//
// TRON instructions are a multiple of two bytes long, so the queue is kept as
// eight halfword slots in a circular buffer. The IF-stage writes one fetched
// 32-bit word per clock (wr_en); big-endian order puts the halfword at the
// lower address in wr_data[31:16]. When fetch restarts at an address with
// addr[1] = 1, the first word carries only its low halfword (wr_lo_only).
// The D-stage sees up to four halfwords at the head (rd_data[63:48] is the
// oldest) and the number that are valid (rd_count), and removes rd_take of
// them (0 to 4, at most rd_count) at the next edge. flush empties the queue
// and wins over a write in the same cycle.
//
// free tells the IF-stage how many slots are empty. The 16-byte size follows
// the document; the halfword organisation and the port widths are this
// design's choices.
//
// Lint notes: rst_n is also the disable condition of the assertions; a linter
// reports that as a synchronous use of the asynchronous reset, while every
// flip-flop here resets asynchronously.
module instr_queue #(
  parameter int unsigned BYTES = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic        wr_en,
  input  logic        wr_lo_only,
  input  logic [31:0] wr_data,
  output logic [$clog2(BYTES/2):0] free,
  output logic [63:0] rd_data,
  output logic [2:0]  rd_count,
  input  logic [2:0]  rd_take
);
  localparam int unsigned SLOTS = BYTES / 2;
  localparam int unsigned PW    = $clog2(SLOTS);

  logic [15:0] q [SLOTS];
  logic [PW-1:0] head, tail;
  logic [PW:0]   cnt;

  assign free = (PW+1)'(SLOTS) - cnt;

  always_comb begin
    for (int i = 0; i < 4; i++) rd_data[63-16*i -: 16] = q[PW'(head + PW'(i))];
    rd_count = (cnt > 4) ? 3'd4 : 3'(cnt);
  end

  logic [1:0]  n_in;
  assign n_in = !wr_en ? 2'd0 : (wr_lo_only ? 2'd1 : 2'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0;
      tail <= '0;
      cnt  <= '0;
      for (int i = 0; i < SLOTS; i++) q[i] <= '0;
    end else if (flush) begin
      head <= '0;
      tail <= '0;
      cnt  <= '0;
    end else begin
      if (wr_en) begin
        if (wr_lo_only) q[tail] <= wr_data[15:0];
        else begin
          q[tail]           <= wr_data[31:16];
          q[PW'(tail + 1'b1)] <= wr_data[15:0];
        end
      end
      tail <= tail + PW'(n_in);
      head <= head + PW'(rd_take);
      cnt  <= cnt + (PW+1)'(n_in) - (PW+1)'(rd_take);
    end
  end

  // The IF-stage must not overfill the queue; the D-stage must not take more
  // than it sees.
  assert property (@(posedge clk) disable iff (!rst_n) !flush |-> (PW+1)'(n_in) <= free);
  assert property (@(posedge clk) disable iff (!rst_n) rd_take <= rd_count);
endmodule
