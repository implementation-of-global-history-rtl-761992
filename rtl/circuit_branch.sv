// circuit_branch: instruction classifier in front of the predictor (CB).
//
// Decides whether the fetched instruction word is a conditional branch, so
// that only conditional branches consult the predictor. `branchin` is
// combinational and high in the fetch cycle when `fetch_valid` is high and
// the major opcode (bits 31:26) is a MicroBlaze conditional branch, register
// or immediate form. It starts the predictor lookup. `notbranchin` is the
// registered complement: one clock later, aligned with the predictor's
// output, it is high when that fetch slot held no conditional branch (or no
// valid instruction), and tells the branch control to force "not taken".
// After reset it is high. The opcode values come from the processor's
// instruction set; which instructions count as "branch", and the split into a
// same-cycle and a next-cycle output, are this design's choices.
module circuit_branch
  import gh_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fetch_valid,
  input  logic [31:0] instr,
  output logic        branchin,
  output logic        notbranchin
);

  logic [5:0] opcode;

  assign opcode   = instr[31:26];
  assign branchin = fetch_valid && (opcode == OPC_BCC || opcode == OPC_BCCI);

  always_ff @(posedge clk) begin
    if (!rst_n) notbranchin <= 1'b1;
    else        notbranchin <= !branchin;
  end

endmodule
