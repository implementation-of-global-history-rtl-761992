// tb_circuit_branch: the instruction classifier.
//
// Every one of the 64 major opcodes is presented with and without
// fetch_valid, with random low bits. branchin must be high in the same cycle
// only for a valid word with opcode 100111 or 101111; notbranchin must be
// its complement one clock later, and high right after reset.
module tb_circuit_branch;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        fetch_valid = 0;
  logic [31:0] instr = 0;
  logic        branchin, notbranchin;
  logic        exp_b, prev_b;
  int          n_branch = 0;

  circuit_branch u_dut (
    .clk(clk), .rst_n(rst_n), .fetch_valid(fetch_valid), .instr(instr),
    .branchin(branchin), .notbranchin(notbranchin));

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
    checks++;
    if (notbranchin !== 1'b1) begin failures++; $display("notbranchin low after reset"); end
    prev_b = 0;
    for (int r = 0; r < 4; r++) begin
      for (int op = 0; op < 64; op++) begin
        fetch_valid = (r != 1);
        instr = {6'(op), 26'($urandom)};
        exp_b = fetch_valid && (op == 'h27 || op == 'h2F);
        #1;
        checks++;
        if (branchin !== exp_b) begin
          failures++; $display("opcode %b valid %b: branchin %b", 6'(op), fetch_valid, branchin);
        end
        if (exp_b) n_branch++;
        prev_b = exp_b;
        @(negedge clk);
        checks++;
        if (notbranchin !== !prev_b) begin
          failures++; $display("opcode %b: notbranchin %b a cycle later", 6'(op), notbranchin);
        end
      end
    end
    checks++;
    if (n_branch != 6) begin failures++; $display("saw %0d branches, expected 6", n_branch); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
