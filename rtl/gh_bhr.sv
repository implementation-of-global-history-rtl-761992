// gh_bhr: global branch history register (first level of the predictor).
//
// An H-bit shift register holding the outcomes of the H most recent resolved
// conditional branches, 1 = taken, newest in bit 0. When `shift_en` is high
// at a clock edge the register shifts left by one, the oldest outcome
// (bit H-1) is dropped and `outcome` enters bit 0. Reset (active low,
// synchronous) loads all ones, as the description prescribes for the 4-bit
// register. The history is updated when a branch resolves, not when it is
// predicted; that choice is this design's own.
module gh_bhr #(
  parameter int unsigned H = gh_pkg::H_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_en,
  input  logic         outcome,
  output logic [H-1:0] history
);

  if (H < 2) begin : g_h_too_small
    $error("gh_bhr: H must be at least 2");
  end

  always_ff @(posedge clk) begin
    if (!rst_n)        history <= '1;
    else if (shift_en) history <= {history[H-2:0], outcome};
  end

endmodule
