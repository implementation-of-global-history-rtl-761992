// tb_branch_control: prediction masking, mispredict flag and the accuracy
// counters.
//
// The four combinations of branchout/notbranchin are checked, then 2000
// cycles of random resolutions; the mispredict flag is checked in the same
// cycle and the two counters after each edge against counts kept here.
module tb_branch_control;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        branchout = 0, notbranchin = 1;
  logic        resolve_valid = 0, resolve_pred = 0, resolve_taken = 0;
  logic        Branch_prediction, pred_valid, mispredict;
  logic [31:0] n_branches, n_correct;
  int unsigned m_total = 0, m_correct = 0;

  branch_control u_dut (
    .clk(clk), .rst_n(rst_n), .branchout(branchout), .notbranchin(notbranchin),
    .Branch_prediction(Branch_prediction), .pred_valid(pred_valid),
    .resolve_valid(resolve_valid), .resolve_pred(resolve_pred),
    .resolve_taken(resolve_taken), .mispredict(mispredict),
    .n_branches(n_branches), .n_correct(n_correct));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      branchout = i[0]; notbranchin = i[1];
      #1;
      checks++;
      if (Branch_prediction !== (i == 1) || pred_valid !== !i[1]) begin
        failures++; $display("branchout %b notbranchin %b: prediction %b valid %b",
                             branchout, notbranchin, Branch_prediction, pred_valid);
      end
    end
    checks++;
    if (n_branches !== 0 || n_correct !== 0) begin failures++; $display("counters not cleared"); end
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      resolve_valid = ($urandom % 3) != 0;
      resolve_pred  = ($urandom % 2) != 0;
      resolve_taken = ($urandom % 4) != 0 ? resolve_pred : !resolve_pred;
      #1;
      checks++;
      if (mispredict !== (resolve_valid && resolve_pred != resolve_taken)) begin
        failures++; $display("cycle %0d: mispredict %b", c, mispredict);
      end
      if (resolve_valid) begin
        m_total++;
        if (resolve_pred == resolve_taken) m_correct++;
      end
      @(posedge clk); #1;
      checks++;
      if (n_branches !== m_total || n_correct !== m_correct) begin
        failures++; $display("cycle %0d: counters %0d/%0d expected %0d/%0d",
                             c, n_correct, n_branches, m_correct, m_total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
