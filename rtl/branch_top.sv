// branch_top: the branch unit (BRANCH) built around the global-history
// two-level predictor.
//
// Three blocks, wired as in the reference schematic:
//   circuit_branch    (CB) classifies the fetched word; its `branchin` starts
//                      a lookup, its `notbranchin` masks the prediction;
//   branch_prediction (BP) indexes the PHT with {PC bits, global history};
//   branch_control    (BC) forms `Branch_prediction` and checks resolved
//                      branches.
// Timing: present `fetch_pc`/`fetch_instr` with `fetch_valid` in cycle t;
// in cycle t+1 `pred_valid` says whether the word was a conditional branch,
// `Branch_prediction` gives taken/not taken, and `pred_idx` the PHT index to
// keep with the branch. When the branch resolves, drive `resolve_valid` for
// one cycle with that index, the prediction made and the actual outcome; the
// PHT counter and the history are updated at that edge and `mispredict`
// flags a wrong guess in the same cycle. Resolutions may arrive in any cycle,
// also together with a fetch. Reset is synchronous and active low.
// Defaults (H = 4 history bits, M = 2 address bits taken from fetch_pc[3:2],
// 64 counters) are the reference configuration; the fetch/resolve protocol
// is this design's.
module branch_top
  import gh_pkg::*;
#(
  parameter int unsigned H      = gh_pkg::H_DEFAULT,
  parameter int unsigned M      = gh_pkg::M_DEFAULT,
  parameter int unsigned PC_LSB = 2,
  parameter ctr_kind_e   KIND   = CTR_SATURATING,
  parameter ctr_t        INIT   = CTR_WNT
) (
  input  logic           clk,
  input  logic           rst_n,
  // fetch
  input  logic           fetch_valid,
  input  logic [31:0]    fetch_pc,
  input  logic [31:0]    fetch_instr,
  // prediction, one cycle after fetch
  output logic           Branch_prediction,
  output logic           pred_valid,
  output logic [H+M-1:0] pred_idx,
  // resolution
  input  logic           resolve_valid,
  input  logic [H+M-1:0] resolve_idx,
  input  logic           resolve_pred,
  input  logic           resolve_taken,
  output logic           mispredict,
  // observation
  output logic [H-1:0]   history,
  output logic [31:0]    n_branches,
  output logic [31:0]    n_correct
);

  logic branchin, notbranchin, branchout;

  circuit_branch u_cb (
    .clk        (clk),
    .rst_n      (rst_n),
    .fetch_valid(fetch_valid),
    .instr      (fetch_instr),
    .branchin   (branchin),
    .notbranchin(notbranchin)
  );

  branch_prediction #(
    .H(H), .M(M), .PC_LSB(PC_LSB), .KIND(KIND), .INIT(INIT)
  ) u_bp (
    .clk      (clk),
    .rst_n    (rst_n),
    .bht_in   (fetch_pc),
    .branchin (branchin),
    .branchout(branchout),
    .pred_idx (pred_idx),
    .upd_valid(resolve_valid),
    .upd_idx  (resolve_idx),
    .upd_taken(resolve_taken),
    .history  (history)
  );

  branch_control u_bc (
    .clk              (clk),
    .rst_n            (rst_n),
    .branchout        (branchout),
    .notbranchin      (notbranchin),
    .Branch_prediction(Branch_prediction),
    .pred_valid       (pred_valid),
    .resolve_valid    (resolve_valid),
    .resolve_pred     (resolve_pred),
    .resolve_taken    (resolve_taken),
    .mispredict       (mispredict),
    .n_branches       (n_branches),
    .n_correct        (n_correct)
  );

endmodule
