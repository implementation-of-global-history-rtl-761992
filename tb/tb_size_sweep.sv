// tb_size_sweep: prediction accuracy against predictor size.
//
// Six predictors run the same synthetic branch stream (see tb_sweep_unit).
// Sizes in bytes at four 2-bit counters per byte, with 2 address bits and
// the rest history: 8 B (32 counters, H = 3), 16 B (64, H = 4, the default),
// 32 B (128, H = 5), 64 B (256, H = 6), 512 B (2048, H = 9) and 1 KB
// (4096, H = 10). The testbench prints the accuracy of each, checks that
// every unit ran cleanly, that the largest predictor beats the smallest by
// at least 5 points, and that it reaches 93% (the stream allows at most
// 17/18, since half the outcomes of one branch in nine are random). The stream is synthetic, so the numbers show the trend
// only, not the accuracy of any particular program.
module tb_size_sweep;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NS = 6;
  localparam int HS [NS] = '{3, 4, 5, 6, 9, 10};
  localparam int BYTES [NS] = '{8, 16, 32, 64, 512, 1024};

  int   tot [NS], right [NS], bad [NS];
  logic dn [NS];

  for (genvar g = 0; g < NS; g++) begin : g_unit
    tb_sweep_unit #(.H(HS[g]), .N(20000)) u_unit (
      .clk(clk), .rst_n(rst_n), .n_total(tot[g]), .n_right(right[g]),
      .n_bad(bad[g]), .done(dn[g]));
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (3) @(negedge clk);
    rst_n = 1;
    do begin
      @(negedge clk);
      all_done = 1;
      for (int i = 0; i < NS; i++) if (!dn[i]) all_done = 0;
    end while (!all_done);
    for (int i = 0; i < NS; i++) begin
      $display("size %5d B  counters %5d  accuracy %0d.%0d%% (%0d/%0d)", BYTES[i], BYTES[i] * 4,
               right[i] * 100 / tot[i], (right[i] * 1000 / tot[i]) % 10, right[i], tot[i]);
      checks++;
      if (bad[i] != 0 || tot[i] != 20000) begin
        failures++; $display("size %0d B: %0d protocol errors", BYTES[i], bad[i]);
      end
    end
    checks++;
    if (right[NS-1] <= right[0] + tot[0] / 20) begin
      failures++; $display("largest predictor not 5 points more accurate than smallest");
    end
    // only the random branch (1 in 9, half of its outcomes) is out of reach
    // once the history spans the inner loop: accuracy near 17/18 = 94.4%
    checks++;
    if (right[NS-1] * 100 < tot[NS-1] * 93) begin
      failures++; $display("largest predictor below 93%%");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
