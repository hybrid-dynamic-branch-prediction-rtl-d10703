// hdbp_len_mask_tb: exhaustive check of the "first MSB 1" fill.
// Every possible BRDT entry of the default width is applied; the expected
// mask, length and long-history flag come from locating the highest set bit
// with a plain search.
module hdbp_len_mask_tb;
  localparam int unsigned W  = hdbp_pkg::BRDT_W;
  localparam int unsigned LW = $clog2(W + 1);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [W-1:0]  entry, mask;
  logic [LW-1:0] hist_len;
  logic          long_hist;

  hdbp_len_mask dut (.entry, .mask, .hist_len, .long_hist);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int msb;
    logic [W-1:0] exp_mask;
    for (int v = 0; v < (1 << W); v++) begin
      entry = W'(v);
      @(posedge clk);
      msb = -1;
      for (int i = 0; i < int'(W); i++) if (entry[i]) msb = i;
      exp_mask = '0;
      for (int i = 0; i <= msb; i++) exp_mask[i] = 1'b1;
      checks++;
      if (mask !== exp_mask || int'(hist_len) != msb + 1 || long_hist !== (msb == int'(W) - 1)) begin
        failures++;
        if (failures < 10)
          $display("entry %b: mask %b len %0d long %b, expected %b %0d %b",
                   entry, mask, hist_len, long_hist, exp_mask, msb + 1, msb == int'(W) - 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
