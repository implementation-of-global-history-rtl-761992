// tb_branch_prediction: the two-level predictor at its default size
// (H = 4, M = 2, address bits 3:2, 64 counters) and at H = 3, M = 3,
// address bits 2:0 (PC_LSB = 0).
//
// First the worked example of the reference configuration: with
// word address 0b01011010010101 (byte address four times that) and
// history 0110 the PHT index must be 010110. Then
// 4000 cycles of random lookups and updates are compared with a model that
// keeps its own history and counter table. Lookups see the state before the
// update of the same edge.
module tb_branch_prediction;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] pc = 0;
  logic        branchin = 0, upd_valid = 0, upd_taken = 0;
  logic [5:0]  upd_idx = 0;
  logic        out_a, out_b;
  logic [5:0]  idx_a, idx_b;
  logic [3:0]  hist_a;
  logic [2:0]  hist_b;

  branch_prediction u_a (
    .clk(clk), .rst_n(rst_n), .bht_in(pc), .branchin(branchin), .branchout(out_a),
    .pred_idx(idx_a), .upd_valid(upd_valid), .upd_idx(upd_idx), .upd_taken(upd_taken),
    .history(hist_a));

  branch_prediction #(.H(3), .M(3), .PC_LSB(0)) u_b (
    .clk(clk), .rst_n(rst_n), .bht_in(pc), .branchin(branchin), .branchout(out_b),
    .pred_idx(idx_b), .upd_valid(upd_valid), .upd_idx(upd_idx), .upd_taken(upd_taken),
    .history(hist_b));

  int tab_a [64], tab_b [64];
  int h_a, h_b;
  int e_idx_a, e_idx_b, e_out_a, e_out_b;

  function automatic int sat_step(int v, logic t);
    return t ? ((v < 3) ? v + 1 : 3) : ((v > 0) ? v - 1 : 0);
  endfunction

  task automatic step_model();
    if (branchin) begin
      e_idx_a = (((pc >> 2) & 3) << 4) | h_a;
      e_idx_b = ((pc & 7) << 3) | h_b;
      e_out_a = tab_a[e_idx_a] >> 1;
      e_out_b = tab_b[e_idx_b] >> 1;
    end
    if (upd_valid) begin
      tab_a[upd_idx] = sat_step(tab_a[upd_idx], upd_taken);
      tab_b[upd_idx] = sat_step(tab_b[upd_idx], upd_taken);
      h_a = ((h_a << 1) | int'(upd_taken)) & 15;
      h_b = ((h_b << 1) | int'(upd_taken)) & 7;
    end
  endtask

  task automatic compare(string what);
    checks++;
    if (idx_a !== 6'(e_idx_a) || out_a !== 1'(e_out_a) || hist_a !== 4'(h_a) ||
        idx_b !== 6'(e_idx_b) || out_b !== 1'(e_out_b) || hist_b !== 3'(h_b)) begin
      failures++;
      $display("%s: a idx %b pred %b hist %b (exp %b %0d %b), b idx %b pred %b hist %b (exp %b %0d %b)",
               what, idx_a, out_a, hist_a, 6'(e_idx_a), e_out_a, 4'(h_a),
               idx_b, out_b, hist_b, 6'(e_idx_b), e_out_b, 3'(h_b));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (tab_a[i]) begin tab_a[i] = 1; tab_b[i] = 1; end
    h_a = 15; h_b = 7; e_idx_a = 0; e_idx_b = 0; e_out_a = 0; e_out_b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (hist_a !== 4'b1111 || hist_b !== 3'b111) begin
      failures++; $display("history after reset %b %b", hist_a, hist_b);
    end
    // worked example: shift in 0,1,1,0 -> history 0110
    for (int k = 0; k < 4; k++) begin
      upd_valid = 1; upd_idx = 6'd63; upd_taken = (k == 1 || k == 2);
      step_model();
      @(negedge clk);
    end
    upd_valid = 0;
    pc = {30'b01011010010101, 2'b00}; branchin = 1;
    step_model();
    @(negedge clk);
    checks++;
    if (idx_a !== 6'b010110) begin
      failures++; $display("worked example: index %b, expected 010110", idx_a);
    end
    compare("worked example");
    // random traffic
    for (int c = 0; c < 4000; c++) begin
      pc        = $urandom;
      branchin  = ($urandom % 3) != 0;
      upd_valid = ($urandom % 2) != 0;
      upd_idx   = (c % 3 == 0) ? 6'(e_idx_a) : 6'($urandom % 16);
      upd_taken = (c < 2000) ? (($urandom % 5) != 0) : (($urandom % 5) == 0);
      step_model();
      @(negedge clk);
      compare($sformatf("cycle %0d", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
