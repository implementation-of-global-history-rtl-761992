// tb_gh_bhr: the history register at H = 4 (default) and H = 7.
//
// After reset both must read all ones. Random shift enables and outcomes
// are then applied for 400 cycles and the contents compared each cycle with
// a model kept as an integer: hist = ((hist << 1) | outcome) mod 2**H.
module tb_gh_bhr;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, shift_en = 0, outcome = 0;
  logic [3:0] hist4;
  logic [6:0] hist7;
  always #5 clk = ~clk;

  gh_bhr u_h4 (.clk(clk), .rst_n(rst_n), .shift_en(shift_en), .outcome(outcome), .history(hist4));
  gh_bhr #(.H(7)) u_h7 (.clk(clk), .rst_n(rst_n), .shift_en(shift_en), .outcome(outcome), .history(hist7));

  int unsigned m4, m7;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    m4 = 32'hF; m7 = 32'h7F;
    checks++;
    if (hist4 !== 4'b1111 || hist7 !== 7'h7F) begin
      failures++; $display("reset value %b %b", hist4, hist7);
    end
    for (int c = 0; c < 400; c++) begin
      shift_en = ($urandom % 4) != 0;
      outcome  = ($urandom % 2) != 0;
      @(negedge clk);
      if (shift_en) begin
        m4 = ((m4 << 1) | 32'(outcome)) & 32'hF;
        m7 = ((m7 << 1) | 32'(outcome)) & 32'h7F;
      end
      checks++;
      if (hist4 !== m4[3:0] || hist7 !== m7[6:0]) begin
        failures++; $display("cycle %0d: history %b/%b expected %b/%b", c, hist4, hist7, m4[3:0], m7[6:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
