// tb_branch_top: end-to-end test of the branch unit at its default size
// (4 history bits, 2 address bits, 64 counters), without parameter overrides.
//
// The testbench plays a small pipeline. Each cycle it may fetch a word
// (conditional branches of both forms, other instructions, or bubbles), reads
// the prediction one cycle later, keeps the branch in an in-flight queue with
// its PHT index, prediction and real outcome, and resolves the oldest branch
// after a random delay, sometimes in the same cycle as a new fetch. A model
// holding its own history register and counter table predicts every lookup;
// predictions, indices, history, the mispredict flag and the accuracy
// counters are all compared with it.
//
// Phase 1: random traffic over eight static branches with different
// behaviours (always, never, alternating, loops, random). Phase 2: a single
// loop branch taken three times then not taken, each branch resolved before
// the next is fetched; after warm-up the 4-bit history tells the four
// positions of the loop apart, so the last 200 iterations must all be
// predicted correctly.
// Every mechanism is counted and each must occur: lookup, masked non-branch,
// correct and wrong prediction, counter saturation at both ends, history
// shift, aliasing of two static branches on one counter, lookup and update of
// the same entry in one cycle, fetch and resolve in one cycle.
module tb_branch_top;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        fetch_valid = 0;
  logic [31:0] fetch_pc = 0, fetch_instr = 0;
  logic        Branch_prediction, pred_valid, mispredict;
  logic [5:0]  pred_idx;
  logic        resolve_valid = 0, resolve_pred = 0, resolve_taken = 0;
  logic [5:0]  resolve_idx = 0;
  logic [3:0]  history;
  logic [31:0] n_branches, n_correct;

  branch_top u_dut (
    .clk(clk), .rst_n(rst_n),
    .fetch_valid(fetch_valid), .fetch_pc(fetch_pc), .fetch_instr(fetch_instr),
    .Branch_prediction(Branch_prediction), .pred_valid(pred_valid), .pred_idx(pred_idx),
    .resolve_valid(resolve_valid), .resolve_idx(resolve_idx), .resolve_pred(resolve_pred),
    .resolve_taken(resolve_taken), .mispredict(mispredict),
    .history(history), .n_branches(n_branches), .n_correct(n_correct));

  typedef struct {
    logic [5:0] idx;
    logic       pred;
    logic       taken;
    int         age;
    int         delay;
  } inflight_t;

  inflight_t q[$];

  // model state
  int tab [64];
  int hist;
  int last_pc [64];
  // expectation for the word fetched in the previous cycle
  logic exp_valid, exp_pred, exp_taken;
  int   exp_idx, exp_delay;
  // mechanism counters
  int n_lookup = 0, n_masked = 0, n_right = 0, n_wrong = 0, n_sat_hi = 0,
      n_sat_lo = 0, n_shift = 0, n_alias = 0, n_collide = 0, n_fetch_res = 0;
  int unsigned m_total = 0, m_correct = 0;
  int loop_wrong_late = 0;

  // static branches of phase 1: PC and behaviour
  logic [31:0] br_pc [8];
  int          br_count [8];

  function automatic logic behaviour(int b);
    int n = br_count[b];
    case (b % 6)
      0: return 1'b1;
      1: return 1'b0;
      2: return n[0];
      3: return (n % 3) != 2;
      4: return (n % 5) == 0;
      default: return ($urandom % 2) == 1;
    endcase
  endfunction

  // One clock cycle. f_kind: 0 bubble, 1 non-branch, 2 branch.
  task automatic cycle(int f_kind, logic [31:0] pc, logic taken, int delay, int res_delay_min);
    logic r_do;
    inflight_t head;
    logic [5:0] lidx;
    // 1. result of last cycle's fetch
    checks++;
    if (pred_valid !== exp_valid || (exp_valid && (Branch_prediction !== exp_pred ||
        pred_idx !== 6'(exp_idx))) || (!exp_valid && Branch_prediction !== 1'b0)) begin
      failures++;
      $display("t=%0t: pred_valid %b pred %b idx %b, expected %b %b %b", $time, pred_valid,
               Branch_prediction, pred_idx, exp_valid, exp_pred, 6'(exp_idx));
    end
    checks++;
    if (history !== 4'(hist)) begin
      failures++; $display("t=%0t: history %b expected %b", $time, history, 4'(hist));
    end
    if (exp_valid) q.push_back('{pred_idx, Branch_prediction, exp_taken, 0, exp_delay});
    foreach (q[i]) q[i].age++;
    // 2. resolution of the oldest branch
    r_do = (q.size() > 0) && (q[0].age > q[0].delay) && (q[0].age > res_delay_min);
    if (r_do) head = q.pop_front();
    resolve_valid = r_do;
    resolve_idx   = r_do ? head.idx : 6'($urandom);
    resolve_pred  = r_do ? head.pred : 1'($urandom);
    resolve_taken = r_do ? head.taken : 1'($urandom);
    // 3. fetch
    fetch_valid = (f_kind != 0);
    fetch_pc    = pc;
    fetch_instr = (f_kind == 2) ? {((($urandom % 2) != 0) ? 6'b100111 : 6'b101111), 26'($urandom)}
                                : {6'b000000, 26'($urandom)};
    if (f_kind == 1 && (($urandom % 2) != 0)) fetch_instr[31:26] = 6'b100110;  // unconditional branch
    // 4. model: lookup sees the table before this edge's update
    exp_valid = (f_kind == 2);
    lidx = 6'({pc[3:2], 4'(hist)});
    if (exp_valid) begin
      exp_idx = int'(lidx); exp_pred = tab[lidx] >= 2; exp_taken = taken; exp_delay = delay;
      n_lookup++;
      if (last_pc[lidx] != -1 && last_pc[lidx] != int'(pc)) n_alias++;
      last_pc[lidx] = int'(pc);
      if (r_do && head.idx == lidx) n_collide++;
    end
    if (f_kind == 1) n_masked++;
    if (r_do && f_kind != 0) n_fetch_res++;
    if (r_do) begin
      if (tab[head.idx] == 3 && head.taken) n_sat_hi++;
      if (tab[head.idx] == 0 && !head.taken) n_sat_lo++;
      tab[head.idx] = head.taken ? ((tab[head.idx] < 3) ? tab[head.idx] + 1 : 3)
                                 : ((tab[head.idx] > 0) ? tab[head.idx] - 1 : 0);
      hist = ((hist << 1) | int'(head.taken)) & 15;
      n_shift++;
      m_total++;
      if (head.pred == head.taken) begin m_correct++; n_right++; end
      else n_wrong++;
    end
    #1;
    checks++;
    if (mispredict !== (r_do && head.pred != head.taken)) begin
      failures++; $display("t=%0t: mispredict %b", $time, mispredict);
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b, k, wrong_before;
    foreach (tab[i]) begin tab[i] = 1; last_pc[i] = -1; end
    hist = 15;
    exp_valid = 0; exp_pred = 0; exp_taken = 0; exp_idx = 0; exp_delay = 0;
    for (int i = 0; i < 8; i++) begin
      br_pc[i] = 32'h0000_1000 + 32'(i * 12);  // words 3 apart: pairs share address bits
      br_count[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // phase 1: random traffic
    for (int c = 0; c < 6000; c++) begin
      k = $urandom % 10;
      if (k < 5) begin
        b = $urandom % 8;
        cycle(2, br_pc[b], behaviour(b), $urandom % 4, 0);
        br_count[b]++;
      end else if (k < 8) begin
        cycle(1, $urandom, 1'b0, 0, 0);
      end else begin
        cycle(0, $urandom, 1'b0, 0, 0);
      end
    end
    while (q.size() > 0 || exp_valid) cycle(0, 0, 1'b0, 0, 0);

    // phase 2: loop branch T,T,T,N, one branch in flight at a time
    for (int it = 0; it < 400; it++) begin
      wrong_before = n_wrong;
      cycle(2, 32'h0000_2008, (it % 4) != 3, 0, 0);
      cycle(1, 32'h0000_200c, 1'b0, 0, 0);   // prediction read, resolution pending
      cycle(1, 32'h0000_2010, 1'b0, 0, 0);   // resolves here
      if (it >= 200 && n_wrong != wrong_before) loop_wrong_late++;
    end
    while (q.size() > 0 || exp_valid) cycle(0, 0, 1'b0, 0, 0);

    checks++;
    if (loop_wrong_late != 0) begin
      failures++; $display("loop: %0d late mispredictions", loop_wrong_late);
    end
    checks++;
    if (n_branches !== m_total || n_correct !== m_correct) begin
      failures++; $display("accuracy counters %0d/%0d expected %0d/%0d", n_correct, n_branches,
                           m_correct, m_total);
    end
    $display("lookups %0d masked %0d right %0d wrong %0d sat_hi %0d sat_lo %0d shifts %0d",
             n_lookup, n_masked, n_right, n_wrong, n_sat_hi, n_sat_lo, n_shift);
    $display("aliasing %0d same-entry lookup/update %0d fetch+resolve %0d accuracy %0d/%0d",
             n_alias, n_collide, n_fetch_res, n_correct, n_branches);
    checks++;
    if (n_lookup == 0 || n_masked == 0 || n_right == 0 || n_wrong == 0 || n_sat_hi == 0 ||
        n_sat_lo == 0 || n_shift == 0 || n_alias == 0 || n_collide == 0 || n_fetch_res == 0) begin
      failures++; $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
