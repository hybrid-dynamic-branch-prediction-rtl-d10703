// hdbp_dyn_index: PHT index of the dynamic-history-length path.
//
// Steps, as in the published scheme:
//  1. the global history is ANDed with the mask built from the BRDT entry,
//     keeping only the correlated recent outcomes (masked BHR);
//  2. the bits the mask clears are not left at 0 but filled with upper PC
//     bits (OR), so branches with short histories still spread over the
//     table (new BHR);
//  3. the new BHR is XORed with the PC shifted by 0 and by 4 bits.
// Which PC bits count as "upper" is not fixed by the published scheme: this design
// takes the n bits starting at UPPER_PC_LSB (default n, the bits just above
// those used by the unshifted PC). Purely combinational.
module hdbp_dyn_index #(
  parameter int unsigned N            = hdbp_pkg::PHT_IDX_W,
  parameter int unsigned PC_W         = hdbp_pkg::PC_W,
  parameter int unsigned UPPER_PC_LSB = N
) (
  input  logic [N-1:0]    ghr_low,   // most recent N outcomes, bit 0 newest
  input  logic [N-1:0]    mask,      // from hdbp_len_mask
  input  logic [PC_W-1:0] pc,
  output logic [N-1:0]    new_bhr,
  output logic [N-1:0]    idx
);

  logic [N-1:0] masked_bhr, upper_pc;

  assign masked_bhr = ghr_low & mask;
  assign upper_pc   = pc[UPPER_PC_LSB +: N];
  assign new_bhr    = masked_bhr | (upper_pc & ~mask);
  assign idx        = new_bhr ^ pc[0 +: N] ^ pc[4 +: N];

  initial assert (UPPER_PC_LSB + N <= PC_W && N + 4 <= PC_W)
    else $error("hdbp_dyn_index: PC too narrow");

endmodule
