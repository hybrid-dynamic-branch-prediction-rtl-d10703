// hdbp_pkg: constants, types and helper functions shared by the hybrid
// dynamic branch predictor (HDBP).
//
// The predictor indexes a table of 2^n two-bit counters. The history path
// that follows register data dependencies is n bits wide (the branch
// register dependency table, BRDT, is as wide as the PHT index), and the
// long global history is 2n bits so that folding it in half yields n bits
// again. A 4K-entry table (n = 12) is the size at which the scheme showed
// its lowest aliasing; 1K to 8K tables are obtained by changing PHT_IDX_W.
// The register count, PC width and the choice of upper PC bits are this
// design's own choices.
package hdbp_pkg;

  // PHT index width n: 2^n entries (4K by default).
  parameter int unsigned PHT_IDX_W = 12;
  // BRDT entry width: the same as the PHT index.
  parameter int unsigned BRDT_W    = PHT_IDX_W;
  // Long global history, folded in half down to BRDT_W bits.
  parameter int unsigned GHR_W     = 2 * BRDT_W;
  // Physical registers tracked by the BRDT (one entry each).
  parameter int unsigned NUM_REGS  = 64;
  parameter int unsigned REG_W     = $clog2(NUM_REGS);
  // Instruction address width (word address, alignment bits removed).
  parameter int unsigned PC_W      = 32;

  // Two-bit saturating counter states.
  typedef enum logic [1:0] {
    CTR_STRONG_NT = 2'b00,
    CTR_WEAK_NT   = 2'b01,
    CTR_WEAK_T    = 2'b10,
    CTR_STRONG_T  = 2'b11
  } ctr_t;

  // Next state of a two-bit saturating counter.
  function automatic ctr_t ctr_next(input ctr_t c, input logic taken);
    ctr_t n;
    if (taken) n = (c == CTR_STRONG_T)  ? CTR_STRONG_T  : ctr_t'(c + 2'd1);
    else       n = (c == CTR_STRONG_NT) ? CTR_STRONG_NT : ctr_t'(c - 2'd1);
    return n;
  endfunction

endpackage
