// hdbp_fold_index: PHT index of the modified gshare path.
//
// The 2N-bit global history is folded in half (upper N bits XOR lower N
// bits), so a history twice as long as the index still fits the table, and
// the result is XORed with the PC shifted by 0, 4 and 12 bits. All of this
// follows the published scheme; only the bit order (bit 0 = newest outcome) is this
// design's choice. Purely combinational.
module hdbp_fold_index #(
  parameter int unsigned N    = hdbp_pkg::PHT_IDX_W,
  parameter int unsigned PC_W = hdbp_pkg::PC_W
) (
  input  logic [2*N-1:0]  ghr,
  input  logic [PC_W-1:0] pc,
  output logic [N-1:0]    folded,
  output logic [N-1:0]    idx
);

  assign folded = ghr[2*N-1:N] ^ ghr[N-1:0];
  assign idx    = folded ^ pc[0 +: N] ^ pc[4 +: N] ^ pc[12 +: N];

  initial assert (N + 12 <= PC_W) else $error("hdbp_fold_index: PC too narrow");

endmodule
