// gh_pht: pattern history table (second level of the predictor).
//
// 2**IDX_W two-bit counters, reset (synchronous, active low) to INIT.
// Lookup port: when `rd_en` is high, the counter at `rd_idx` is registered
// and appears on `rd_ctr` one clock later (a synchronous read, as an FPGA
// block RAM gives); `rd_ctr` holds its value while `rd_en` is low.
// Update port: when `upd_en` is high, the counter at `upd_idx` is replaced
// by its successor for outcome `upd_taken` at the clock edge (read-modify-
// write within one cycle). If lookup and update hit the same entry in the
// same cycle, the lookup returns the value before the update. The counter
// rule and the reset value are parameters; the weakly-not-taken reset value
// is this design's choice.
module gh_pht
  import gh_pkg::*;
#(
  parameter int unsigned IDX_W = gh_pkg::H_DEFAULT + gh_pkg::M_DEFAULT,
  parameter ctr_kind_e   KIND  = CTR_SATURATING,
  parameter ctr_t        INIT  = CTR_WNT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd_en,
  input  logic [IDX_W-1:0] rd_idx,
  output ctr_t             rd_ctr,
  input  logic             upd_en,
  input  logic [IDX_W-1:0] upd_idx,
  input  logic             upd_taken
);

  localparam int unsigned ENTRIES = 2 ** IDX_W;

  ctr_t table_q [ENTRIES];
  ctr_t upd_cur, upd_nxt;
  logic upd_pred_unused;

  assign upd_cur = table_q[upd_idx];

  two_bit_counter #(.KIND(KIND)) u_ctr (
    .cur  (upd_cur),
    .taken(upd_taken),
    .nxt  (upd_nxt),
    .pred (upd_pred_unused)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < ENTRIES; i++) table_q[i] <= INIT;
    end else if (upd_en) begin
      table_q[upd_idx] <= upd_nxt;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     rd_ctr <= INIT;
    else if (rd_en) rd_ctr <= table_q[rd_idx];
  end

endmodule
