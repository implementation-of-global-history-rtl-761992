// gh_pkg: types, constants and the 2-bit counter rule shared by the
// global-history branch predictor.
//
// The predictor keeps an h-bit global branch history register (BHR) and a
// pattern history table (PHT) of 2-bit counters indexed by the concatenation
// of m branch-address bits with the BHR. The defaults h = 4 and m = 2 give the
// 64-entry table of the reference configuration. The BHR starts as all ones.
//
// Two counter rules are offered. CTR_SATURATING is an up/down counter that
// saturates at 00 and 11 (taken increments, not taken decrements); it is the
// rule used for the PHT and the default. CTR_HYSTERESIS is the four-state
// machine in which a wrong guess from a weak state jumps straight to the
// strong state of the other direction (10 -not taken-> 00, 01 -taken-> 11).
// In both, the counter MSB is the prediction (1 = taken).
//
// The instruction opcodes are those of the MicroBlaze conditional branches
// (major opcode in instruction bits 31:26 in the usual LSB-0 numbering):
// 6'b100111 is the register form (beq, bne, blt, ble, bgt, bge) and 6'b101111
// the immediate form (beqi ... bgei). These come from the processor's
// instruction set, not from the predictor description.
package gh_pkg;

  // Default history length (BHR bits) and number of branch-address bits.
  localparam int unsigned H_DEFAULT = 4;
  localparam int unsigned M_DEFAULT = 2;

  typedef logic [1:0] ctr_t;

  localparam ctr_t CTR_SNT = 2'b00;  // strongly not taken
  localparam ctr_t CTR_WNT = 2'b01;  // weakly not taken
  localparam ctr_t CTR_WT  = 2'b10;  // weakly taken
  localparam ctr_t CTR_ST  = 2'b11;  // strongly taken

  typedef enum logic {
    CTR_SATURATING = 1'b0,
    CTR_HYSTERESIS = 1'b1
  } ctr_kind_e;

  localparam logic [5:0] OPC_BCC  = 6'b100111;  // conditional branch, register
  localparam logic [5:0] OPC_BCCI = 6'b101111;  // conditional branch, immediate

  // Next counter state after a resolved branch with outcome `taken`.
  function automatic ctr_t ctr_next(ctr_kind_e kind, ctr_t cur, logic taken);
    ctr_t nxt;
    if (kind == CTR_SATURATING) begin
      if (taken) nxt = (cur == CTR_ST)  ? CTR_ST  : ctr_t'(cur + 2'd1);
      else       nxt = (cur == CTR_SNT) ? CTR_SNT : ctr_t'(cur - 2'd1);
    end else begin
      unique case (cur)
        CTR_ST:  nxt = taken ? CTR_ST : CTR_WT;
        CTR_WT:  nxt = taken ? CTR_ST : CTR_SNT;
        CTR_WNT: nxt = taken ? CTR_ST : CTR_SNT;
        default: nxt = taken ? CTR_WNT : CTR_SNT;
      endcase
    end
    return nxt;
  endfunction

endpackage
