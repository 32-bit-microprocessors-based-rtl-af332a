// branch_buffer: 4-byte x 64-entry direct-mapped instruction buffer (256
// bytes) in the IF-stage.
//
// Each entry holds one aligned 32-bit instruction word, a tag (the address
// bits above the index) and a valid bit. The index is addr[7:2]. The IF-stage
// looks an address up combinationally (lk_addr -> lk_hit, lk_data) and, when
// it fetched a word from external memory that should be kept, writes it
// (wr_en, wr_addr, wr_data) at the next clock edge. inv clears every valid
// bit (for example after instruction memory has been modified).
//
// Which words are written (branch targets only, or every fetched word when
// the buffer is used as a general cache) is decided by the IF-stage. Size,
// word width and direct mapping follow the document; the tag layout and the
// invalidate input are this design's choices.
//
// Lint notes: The low address bits below the index and tag (the byte within
// the word) are not used: entries hold whole aligned words.
module branch_buffer #(
  parameter int unsigned ENTRIES = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        inv,
  input  logic [31:0] lk_addr,
  output logic        lk_hit,
  output logic [31:0] lk_data,
  input  logic        wr_en,
  input  logic [31:0] wr_addr,
  input  logic [31:0] wr_data
);
  localparam int unsigned IW = $clog2(ENTRIES);
  localparam int unsigned TW = 32 - IW - 2;

  logic [31:0]   data [ENTRIES];
  logic [TW-1:0] tag  [ENTRIES];
  logic [ENTRIES-1:0] valid;

  logic [IW-1:0] lk_idx, wr_idx;
  assign lk_idx = lk_addr[IW+1:2];
  assign wr_idx = wr_addr[IW+1:2];

  assign lk_hit  = valid[lk_idx] && tag[lk_idx] == lk_addr[31:IW+2];
  assign lk_data = data[lk_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '0;
    else if (inv) valid <= '0;
    else if (wr_en) valid[wr_idx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      data[wr_idx] <= wr_data;
      tag[wr_idx]  <= wr_addr[31:IW+2];
    end
  end
endmodule
