// tb_two_bit_counter: exhaustive check of both 2-bit counter rules.
//
// Every (state, outcome) pair is applied to a saturating and a hysteresis
// instance and compared with transition tables written out by hand here:
// saturating 00<->01<->10<->11, hysteresis 11-N->10, 10-T->11, 10-N->00,
// 01-T->11, 01-N->00, 00-T->01, 00-N->00. The prediction must be the MSB.
module tb_two_bit_counter;
  import gh_pkg::*;

  int checks = 0, failures = 0;

  ctr_t cur, nxt_s, nxt_h;
  logic taken, pred_s, pred_h;

  two_bit_counter #(.KIND(CTR_SATURATING)) u_sat (
    .cur(cur), .taken(taken), .nxt(nxt_s), .pred(pred_s));
  two_bit_counter #(.KIND(CTR_HYSTERESIS)) u_hys (
    .cur(cur), .taken(taken), .nxt(nxt_h), .pred(pred_h));

  // index = {state, taken}
  logic [1:0] exp_sat [8] = '{2'b00, 2'b01, 2'b00, 2'b10, 2'b01, 2'b11, 2'b10, 2'b11};
  logic [1:0] exp_hys [8] = '{2'b00, 2'b01, 2'b00, 2'b11, 2'b00, 2'b11, 2'b10, 2'b11};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      cur   = ctr_t'(i >> 1);
      taken = i[0];
      #1;
      checks += 4;
      if (nxt_s !== exp_sat[i]) begin
        failures++; $display("saturating: state %b taken %b -> %b, expected %b", cur, taken, nxt_s, exp_sat[i]);
      end
      if (nxt_h !== exp_hys[i]) begin
        failures++; $display("hysteresis: state %b taken %b -> %b, expected %b", cur, taken, nxt_h, exp_hys[i]);
      end
      if (pred_s !== cur[1] || pred_h !== cur[1]) begin
        failures += 2; $display("prediction of state %b wrong", cur);
      end
    end
    // a walk: two not-taken outcomes are needed to flip a strongly-taken counter
    cur = 2'b11; taken = 1'b0; #1;
    cur = nxt_s; #1;
    checks++;
    if (pred_s !== 1'b1) begin failures++; $display("flipped after one miss"); end
    cur = nxt_s; #1;
    checks++;
    if (pred_s !== 1'b0) begin failures++; $display("not flipped after two misses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
