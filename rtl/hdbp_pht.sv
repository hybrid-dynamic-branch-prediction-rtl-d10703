// hdbp_pht: pattern history table of 2^N two-bit saturating counters.
//
// Read port: rd_idx selects a counter; rd_taken is its upper bit
// (combinational, same cycle). Update port: on upd_valid the counter at
// upd_idx moves one step towards upd_taken at the next clock edge,
// saturating at 00 and 11.
//
// The table is a plain memory without a reset of its own. After reset it
// walks through all 2^N entries, one per cycle, writing weakly not taken;
// ready rises when the walk is over (2^N cycles after reset is released).
// Updates offered before ready are dropped, and reads before ready are not
// meaningful.
//
// The two-bit counters and 2^N entries follow the published scheme; the reset
// value, the initialisation walk and the one-read/one-write port
// arrangement are this design's choices.
module hdbp_pht #(
  parameter int unsigned N = hdbp_pkg::PHT_IDX_W
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic           ready,
  input  logic [N-1:0]   rd_idx,
  output logic           rd_taken,
  output hdbp_pkg::ctr_t rd_ctr,
  input  logic           upd_valid,
  input  logic [N-1:0]   upd_idx,
  input  logic           upd_taken
);
  import hdbp_pkg::*;

  ctr_t         tbl [2**N];
  logic [N-1:0] init_idx;
  logic         init_busy;

  assign ready    = ~init_busy;
  assign rd_ctr   = tbl[rd_idx];
  assign rd_taken = rd_ctr[1];

  // initialisation walk
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_idx  <= '0;
    end else if (init_busy) begin
      init_idx <= init_idx + 1'b1;
      if (init_idx == '1) init_busy <= 1'b0;
    end
  end

  // single write port: initialisation or training
  always_ff @(posedge clk) begin
    if (init_busy)      tbl[init_idx] <= CTR_WEAK_NT;
    else if (upd_valid) tbl[upd_idx]  <= ctr_next(tbl[upd_idx], upd_taken);
  end

endmodule
