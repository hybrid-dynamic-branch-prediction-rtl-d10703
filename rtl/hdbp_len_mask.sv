// hdbp_len_mask: turns a BRDT entry into a history mask and a length.
//
// Every bit from the most significant 1 of the entry down to bit 0 is set
// ("first MSB 1" fill), so the mask keeps the whole stretch of recent
// history up to the furthest correlated branch. hist_len is the number of
// bits kept (0 when the entry is empty). long_hist is set when the length
// reaches the full width, i.e. the correlated branch lies at or beyond the
// reach of the entry: the predictor then switches to the folded long
// history. The fill is the published scheme's; how the length is encoded is this
// design's choice. Purely combinational.
module hdbp_len_mask #(
  parameter int unsigned WIDTH = hdbp_pkg::BRDT_W,
  localparam int unsigned LW   = $clog2(WIDTH + 1)
) (
  input  logic [WIDTH-1:0] entry,
  output logic [WIDTH-1:0] mask,
  output logic [LW-1:0]    hist_len,
  output logic             long_hist
);

  // Prefix OR from the MSB downwards.
  always_comb begin
    mask[WIDTH-1] = entry[WIDTH-1];
    for (int i = int'(WIDTH) - 2; i >= 0; i--)
      mask[i] = mask[i+1] | entry[i];
  end

  // The mask is a thermometer code: its length is its population count.
  always_comb begin
    hist_len = '0;
    for (int i = 0; i < int'(WIDTH); i++)
      hist_len += LW'(mask[i]);
  end

  assign long_hist = entry[WIDTH-1];

endmodule
