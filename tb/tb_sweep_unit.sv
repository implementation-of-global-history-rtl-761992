// tb_sweep_unit: one predictor of the size sweep together with its driver.
//
// Holds a branch_top with H history bits and 2 address bits and runs a fixed
// synthetic branch stream through it, a loop nest in rounds of nine
// branches: an inner-loop branch at one address executed six times (taken
// five times, then not taken), a branch taken at random (a linear
// congruential generator, the same in every unit), a branch at the next
// address that repeats that outcome, and an always-taken branch. The inner
// loop exit is predictable only from enough history, the repeating branch
// from one bit of it, the random branch not at all (about 1 in 18 branches
// must miss). Each branch is fetched in one cycle and resolved in the next,
// when its prediction is read. The unit counts branches and correct
// predictions, checks the predictor's own counters against them, and raises
// `done` at the end.
module tb_sweep_unit #(
  parameter int H = 4,
  parameter int N = 20000
) (
  input  logic clk,
  input  logic rst_n,
  output int   n_total,
  output int   n_right,
  output int   n_bad,
  output logic done
);
  logic           fetch_valid, resolve_valid, resolve_pred, resolve_taken;
  logic [31:0]    fetch_pc, fetch_instr;
  logic           Branch_prediction, pred_valid, mispredict;
  logic [H+1:0]   pred_idx, resolve_idx;
  logic [H-1:0]   history;
  logic [31:0]    n_branches, n_correct;

  branch_top #(.H(H), .M(2)) u_dut (
    .clk(clk), .rst_n(rst_n),
    .fetch_valid(fetch_valid), .fetch_pc(fetch_pc), .fetch_instr(fetch_instr),
    .Branch_prediction(Branch_prediction), .pred_valid(pred_valid), .pred_idx(pred_idx),
    .resolve_valid(resolve_valid), .resolve_idx(resolve_idx), .resolve_pred(resolve_pred),
    .resolve_taken(resolve_taken), .mispredict(mispredict),
    .history(history), .n_branches(n_branches), .n_correct(n_correct));

  int unsigned lcg;
  logic        prev_out, outcome;

  initial begin
    fetch_valid = 0; fetch_pc = 0; fetch_instr = 0;
    resolve_valid = 0; resolve_pred = 0; resolve_taken = 0; resolve_idx = '0;
    n_total = 0; n_right = 0; n_bad = 0; done = 0;
    lcg = 12345; prev_out = 0;
    @(posedge rst_n);
    @(negedge clk);
    for (int s = 0; s < N; s++) begin
      int b;
      b = s % 9;
      // round of 9: loop branch six times (T T T T T N), a random branch,
      // a branch that repeats it, an always-taken branch
      if (b < 6) outcome = (b != 5);
      else if (b == 6) begin
        lcg = lcg * 1103515245 + 12345;
        outcome = lcg[16];
      end else if (b == 7) outcome = prev_out;
      else outcome = 1'b1;
      prev_out = outcome;
      // fetch
      resolve_valid = 0;
      fetch_valid = 1;
      fetch_pc    = 32'h0000_4000 + 32'(((b < 6) ? 0 : b - 5) * 4);
      fetch_instr = {6'b101111, 26'h0};
      @(negedge clk);
      // prediction is visible now; resolve it
      fetch_valid = 0;
      if (!pred_valid) n_bad++;
      resolve_valid = 1;
      resolve_idx   = pred_idx;
      resolve_pred  = Branch_prediction;
      resolve_taken = outcome;
      n_total++;
      if (Branch_prediction == outcome) n_right++;
      @(negedge clk);
    end
    resolve_valid = 0;
    @(negedge clk);
    if (n_branches != 32'(n_total) || n_correct != 32'(n_right)) n_bad++;
    done = 1;
  end
endmodule
