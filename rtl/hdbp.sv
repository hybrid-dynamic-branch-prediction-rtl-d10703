// hdbp: hybrid dynamic branch predictor (top level).
//
// The predictor fights destructive aliasing in a table of two-bit counters
// by making the index depend on exactly those past branch outcomes that the
// branch's operands depend on, and by mixing PC bits in wherever history is
// left out.
//
// Prediction (combinational, same cycle):
//  * the BRDT entries of the branch's source registers are ORed; the
//    result, filled from its highest 1 down ("first MSB 1"), is the mask of
//    correlated history;
//  * if the correlated branch is within the BRDT's reach, the index is the
//    dynamic-length path: (GHR & mask) | (upper PC & ~mask), XOR PC, XOR
//    PC>>4;
//  * if the history length reaches the BRDT width, the index is the
//    modified gshare path: the 2n-bit GHR folded in half, XOR PC, PC>>4,
//    PC>>12;
//  * the two-bit counter at that index gives the direction.
// pred_idx is returned so that the caller can hand it back on update.
// After reset the PHT spends 2^n cycles initialising its counters; ready
// rises when it is done, and requests should wait for it.
//
// Update (registered, next clock edge):
//  * upd_valid: a branch resolved; the counter at upd_idx is trained with
//    upd_taken, the GHR shifts the outcome in and the BRDT ages by one
//    basic block;
//  * wr_valid: an instruction wrote a register; its BRDT entry now points
//    at the current basic block.
// The datapath follows the published scheme. The port-level protocol (one
// prediction, one update and one register write per cycle, history updated
// with resolved outcomes, in program order) is this design's own choice.
module hdbp
  import hdbp_pkg::*;
#(
  parameter int unsigned N        = hdbp_pkg::PHT_IDX_W,
  parameter int unsigned NREGS    = hdbp_pkg::NUM_REGS,
  parameter int unsigned PCW      = hdbp_pkg::PC_W,
  localparam int unsigned RW      = $clog2(NREGS),
  localparam int unsigned LW      = $clog2(N + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic           ready,         // PHT initialised
  // prediction request
  input  logic [PCW-1:0] pred_pc,
  input  logic           pred_src1_valid,
  input  logic [RW-1:0]  pred_src1,
  input  logic           pred_src2_valid,
  input  logic [RW-1:0]  pred_src2,
  output logic           pred_taken,
  output logic [N-1:0]   pred_idx,
  output logic           pred_fold,     // 1: folded-history path used
  output logic [LW-1:0]  pred_hist_len, // correlated history length
  // resolved branch
  input  logic           upd_valid,
  input  logic [N-1:0]   upd_idx,
  input  logic           upd_taken,
  // register-writing instruction
  input  logic           wr_valid,
  input  logic [RW-1:0]  wr_dst
);

  logic [2*N-1:0] ghr;
  logic [N-1:0]   entry, mask, new_bhr, dyn_idx, folded, fold_idx;
  logic           long_hist;
  ctr_t           ctr;

  brdt #(.NUM_REGS(NREGS), .WIDTH(N)) u_brdt (
    .clk, .rst_n,
    .wr_valid, .wr_dst,
    .br_age       (upd_valid),
    .rd_src1_valid(pred_src1_valid), .rd_src1(pred_src1),
    .rd_src2_valid(pred_src2_valid), .rd_src2(pred_src2),
    .rd_entry     (entry)
  );

  hdbp_len_mask #(.WIDTH(N)) u_mask (
    .entry, .mask, .hist_len(pred_hist_len), .long_hist
  );

  hdbp_ghr #(.W(2*N)) u_ghr (
    .clk, .rst_n, .upd_valid, .upd_taken, .ghr
  );

  hdbp_dyn_index #(.N(N), .PC_W(PCW)) u_dyn (
    .ghr_low(ghr[N-1:0]), .mask, .pc(pred_pc), .new_bhr, .idx(dyn_idx)
  );

  hdbp_fold_index #(.N(N), .PC_W(PCW)) u_fold (
    .ghr, .pc(pred_pc), .folded, .idx(fold_idx)
  );

  // "If (global history length >= BRDT width)": folded long history.
  assign pred_fold = long_hist;
  assign pred_idx  = pred_fold ? fold_idx : dyn_idx;

  hdbp_pht #(.N(N)) u_pht (
    .clk, .rst_n, .ready,
    .rd_idx(pred_idx), .rd_taken(pred_taken), .rd_ctr(ctr),
    .upd_valid, .upd_idx, .upd_taken
  );

endmodule
