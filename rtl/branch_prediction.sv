// branch_prediction: global-history two-level branch predictor (BP).
//
// The PHT index is the concatenation {PC[PC_LSB +: M], BHR}: M branch-address
// bits on top, the H-bit global history below, giving 2**(H+M) two-bit
// counters (64 for the default H = 4, M = 2). The prediction is the MSB of
// the indexed counter.
//
// Lookup: in the cycle the fetched instruction is decoded as a conditional
// branch, `branchin` is high and the index is formed from `bht_in` (the
// fetch PC) and the current history. One clock later `branchout` carries the
// prediction and `pred_idx` the index used, which the pipeline keeps with the
// branch. Both hold while `branchin` is low.
//
// Update: when the branch resolves, the caller returns that index on
// `upd_idx` with the outcome on `upd_taken` and raises `upd_valid`. At the
// clock edge the counter is moved toward the outcome and then the history
// shifts left with the outcome entering bit 0. The history therefore holds
// resolved outcomes only. The concatenation order, the all-ones history
// reset and the counter rule follow the description; the update port and the
// one-cycle lookup latency are this design's. PC_LSB = 2 takes the address
// bits just above the byte offset, which is always 00 for the word-aligned
// 32-bit instructions of the processor; the reference example takes the
// lowest bits of the address it prints, read here as a word address.
// PC_LSB = 0 takes bits 1:0 literally.
module branch_prediction
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
  // lookup
  input  logic [31:0]    bht_in,
  input  logic           branchin,
  output logic           branchout,
  output logic [H+M-1:0] pred_idx,
  // update
  input  logic           upd_valid,
  input  logic [H+M-1:0] upd_idx,
  input  logic           upd_taken,
  // observation
  output logic [H-1:0]   history
);

  localparam int unsigned IDX_W = H + M;

  if (M < 1 || PC_LSB + M > 32) begin : g_bad_m
    $error("branch_prediction: PC_LSB + M must lie within 1..32");
  end

  logic [IDX_W-1:0] lookup_idx;
  ctr_t             rd_ctr;

  assign lookup_idx = {bht_in[PC_LSB +: M], history};

  gh_bhr #(.H(H)) u_bhr (
    .clk     (clk),
    .rst_n   (rst_n),
    .shift_en(upd_valid),
    .outcome (upd_taken),
    .history (history)
  );

  gh_pht #(.IDX_W(IDX_W), .KIND(KIND), .INIT(INIT)) u_pht (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_en    (branchin),
    .rd_idx   (lookup_idx),
    .rd_ctr   (rd_ctr),
    .upd_en   (upd_valid),
    .upd_idx  (upd_idx),
    .upd_taken(upd_taken)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)        pred_idx <= '0;
    else if (branchin) pred_idx <= lookup_idx;
  end

  assign branchout = rd_ctr[1];

endmodule
