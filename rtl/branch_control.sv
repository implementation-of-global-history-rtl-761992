// branch_control: final prediction and resolution check (BC).
//
// Prediction side (combinational): `Branch_prediction` is the predictor's
// `branchout` when the decoder reports a conditional branch, and 0 (not
// taken, fall through) when `notbranchin` is high; `pred_valid` marks a
// cycle that carries a real prediction.
// Resolution side: when a branch resolves (`resolve_valid`), the prediction
// that went with it (`resolve_pred`) is compared with the outcome
// (`resolve_taken`); `mispredict` is high in that cycle when they differ,
// telling the pipeline to flush and refetch. Two 32-bit counters, cleared by
// reset (synchronous, active low), count resolved branches and correct
// predictions, so that accuracy = n_correct / n_branches, the figure of merit
// the predictor is judged by. The resolution side and the counters are this
// design's interpretation of the block, whose insides are not described.
module branch_control (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        branchout,
  input  logic        notbranchin,
  output logic        Branch_prediction,
  output logic        pred_valid,
  input  logic        resolve_valid,
  input  logic        resolve_pred,
  input  logic        resolve_taken,
  output logic        mispredict,
  output logic [31:0] n_branches,
  output logic [31:0] n_correct
);

  assign pred_valid        = !notbranchin;
  assign Branch_prediction = branchout && !notbranchin;
  assign mispredict        = resolve_valid && (resolve_pred != resolve_taken);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_branches <= '0;
      n_correct  <= '0;
    end else if (resolve_valid) begin
      n_branches <= n_branches + 32'd1;
      if (!mispredict) n_correct <= n_correct + 32'd1;
    end
  end

  a_correct_le_total: assert property (@(posedge clk) disable iff (!rst_n)
    n_correct <= n_branches);

endmodule
