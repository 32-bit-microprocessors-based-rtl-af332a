// prejump_unit: pre-jump processing (pre-branch and pre-return) in the
// D-stage, and its check in the E-stage.
//
// D-stage side: when a control-transfer instruction is decoded (d_valid), the
// unit decides at once whether to redirect instruction fetch:
//   BRA, BSR, ACB/SCB   always pre-branch to PC + displacement (PC adder);
//   Bcc                 pre-branch if the branch history table says taken;
//   RTS/EXITD           pre-return to PC1 popped from the on-chip PC stack
//                       (no pre-return when the stack is empty).
// BSR and other calls push their return address (PC + instruction length) on
// the PC stack. The prediction (d_pred), pre-return flag (d_pret) and PC1
// (d_pc1) travel down the pipeline with the instruction and come back at the
// E-stage as e_pred, e_pret and e_pc1.
//
// E-stage side: Bcc updates the history table with its real outcome and, if
// the prediction was wrong, flushes the pipeline and restarts fetch at the
// correct address. ACB/SCB flush when they do not branch. A return compares
// PC1 with the address PC2 popped from the external stack; if they match no
// jump is needed, otherwise the pipeline is flushed and fetch restarts at PC2.
// An E-stage flush in the same cycle cancels the D-stage action.
//
// All outputs are combinational; table and stack updates happen at the next
// edge. The decisions above follow the document. Using the instruction's own
// address as the base of the PC adder, pushing at decode rather than at
// execution, and the ev_* event pulses are this design's choices.
//
// Lint notes: The PC stack's entry count output is not needed here: pop_valid
// alone tells whether a pre-return is possible.
module prejump_unit
  import gm_pkg::*;
#(
  parameter int unsigned BPT_ENTRIES = 256,
  parameter int unsigned PCS_DEPTH   = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // D-stage
  input  logic        d_valid,
  input  ctrl_kind_e  d_kind,
  input  logic [31:0] d_pc,
  input  logic [31:0] d_disp,
  input  logic [3:0]  d_len,      // instruction length in bytes
  output logic        d_redirect,
  output logic [31:0] d_target,
  output logic        d_pred,
  output logic        d_pret,
  output logic [31:0] d_pc1,
  // E-stage
  input  logic        e_valid,
  input  ctrl_kind_e  e_kind,
  input  logic [31:0] e_pc,
  input  logic [31:0] e_disp,
  input  logic [3:0]  e_len,
  input  logic        e_taken,    // real outcome of Bcc / ACB / SCB
  input  logic        e_pred,
  input  logic        e_pret,
  input  logic [31:0] e_pc1,
  input  logic [31:0] e_pc2,      // return address read from external stack
  output logic        flush,
  output logic [31:0] flush_target,
  // events
  output logic        ev_prebranch,
  output logic        ev_mispredict,
  output logic        ev_preret_hit,
  output logic        ev_preret_miss
);
  logic        bpt_taken;
  logic        stk_valid;
  logic [31:0] stk_top;
  logic        push, pop;
  logic [31:0] pc_sum;
  logic [$clog2(PCS_DEPTH):0] stk_count;

  branch_pred_table #(.ENTRIES(BPT_ENTRIES)) u_bpt (
    .clk, .rst_n,
    .lk_pc    (d_pc),
    .lk_taken (bpt_taken),
    .upd_en   (e_valid && e_kind == CT_BCC),
    .upd_pc   (e_pc),
    .upd_taken(e_taken)
  );

  pc_stack #(.DEPTH(PCS_DEPTH)) u_pcs (
    .clk, .rst_n,
    .push, .push_data(d_pc + 32'(d_len)),
    .pop, .pop_data(stk_top), .pop_valid(stk_valid),
    .count(stk_count)
  );

  assign pc_sum = d_pc + d_disp;  // PC adder

  // E-stage check
  always_comb begin
    flush          = 1'b0;
    flush_target   = '0;
    ev_mispredict  = 1'b0;
    ev_preret_hit  = 1'b0;
    ev_preret_miss = 1'b0;
    if (e_valid) begin
      unique case (e_kind)
        CT_BCC: if (e_taken != e_pred) begin
          flush         = 1'b1;
          flush_target  = e_taken ? e_pc + e_disp : e_pc + 32'(e_len);
          ev_mispredict = 1'b1;
        end
        CT_LOOP: if (!e_taken) begin
          flush         = 1'b1;
          flush_target  = e_pc + 32'(e_len);
          ev_mispredict = 1'b1;
        end
        CT_RET: begin
          if (e_pret && e_pc1 == e_pc2) ev_preret_hit = 1'b1;
          else begin
            flush          = 1'b1;
            flush_target   = e_pc2;
            ev_preret_miss = 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  // D-stage pre-jump
  logic d_act;
  assign d_act = d_valid && !flush;

  always_comb begin
    d_redirect = 1'b0;
    d_target   = pc_sum;
    d_pred     = 1'b0;
    d_pret     = 1'b0;
    d_pc1      = stk_top;
    push       = 1'b0;
    pop        = 1'b0;
    if (d_act) begin
      unique case (d_kind)
        CT_BRA, CT_LOOP: begin d_redirect = 1'b1; d_pred = 1'b1; end
        CT_BSR:  begin d_redirect = 1'b1; d_pred = 1'b1; push = 1'b1; end
        CT_BCC:  begin d_redirect = bpt_taken; d_pred = bpt_taken; end
        CT_CALL: push = 1'b1;
        CT_RET:  if (stk_valid) begin
          d_redirect = 1'b1;
          d_target   = stk_top;
          d_pret     = 1'b1;
          pop        = 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign ev_prebranch = d_redirect;
endmodule
