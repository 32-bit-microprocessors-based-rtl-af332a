// branch_pred_table: 1-bit x 256-entry branch history table for conditional
// branches (Bcc).
//
// The table is direct mapped by the low nine bits of the Bcc instruction
// address; bit 0 is always zero (instructions are halfword aligned), so
// PC[8:1] selects the entry. Each entry holds the outcome of the most recent
// Bcc that mapped to it (1 = taken) and is the prediction for the next one.
// There is no tag: Bcc instructions 512 bytes apart share an entry.
//
// Interface: a combinational lookup (lk_pc -> lk_taken) used by the D-stage,
// and a write port (upd_en, upd_pc, upd_taken) used when the E-stage knows
// the outcome; the write takes effect at the next clock edge.
// Table size, indexing and one-bit history follow the document. Clearing every
// entry to "not taken" at reset is this design's choice.
//
// Lint notes: Of lk_pc and upd_pc only the index bits are used (bit 0 is
// always 0, and higher bits are not tagged).
module branch_pred_table #(
  parameter int unsigned ENTRIES = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] lk_pc,
  output logic        lk_taken,
  input  logic        upd_en,
  input  logic [31:0] upd_pc,
  input  logic        upd_taken
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [ENTRIES-1:0] hist;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hist <= '0;
    else if (upd_en) hist[upd_pc[IW:1]] <= upd_taken;
  end

  assign lk_taken = hist[lk_pc[IW:1]];
endmodule
