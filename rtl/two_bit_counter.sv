// two_bit_counter: update rule and prediction of one 2-bit PHT counter.
//
// Purely combinational. Given the current state `cur` and the resolved
// outcome `taken`, it gives the next state `nxt`; `pred` is the MSB of `cur`
// (1 = predict taken). With KIND = CTR_SATURATING (default) taken counts up
// and not-taken counts down, saturating at 00 and 11, which is the rule the
// predictor uses for its table. KIND = CTR_HYSTERESIS selects the four-state
// machine in which a miss from a weak state jumps to the opposite strong
// state. Choosing the saturating rule as the default is this design's reading
// of the description, which uses both.
module two_bit_counter
  import gh_pkg::*;
#(
  parameter ctr_kind_e KIND = CTR_SATURATING
) (
  input  ctr_t cur,
  input  logic taken,
  output ctr_t nxt,
  output logic pred
);

  always_comb begin
    nxt  = ctr_next(KIND, cur, taken);
    pred = cur[1];
  end

endmodule
