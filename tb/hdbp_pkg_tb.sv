// hdbp_pkg_tb: exhaustive check of the two-bit saturating counter update
// in hdbp_pkg, and of the default sizes' relations (BRDT as wide as the PHT
// index, global history twice that, PC wide enough for the 12-bit shift).
module hdbp_pkg_tb;
  import hdbp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    ctr_t c, n;
    for (int v = 0; v < 4; v++) begin
      for (int t = 0; t < 2; t++) begin
        @(posedge clk);
        c = ctr_t'(v);
        n = ctr_next(c, t == 1);
        exp = (t == 1) ? ((v == 3) ? 3 : v + 1) : ((v == 0) ? 0 : v - 1);
        checks++;
        if (int'(n) != exp) begin
          failures++;
          $display("ctr %0d taken %0d: got %0d expected %0d", v, t, n, exp);
        end
      end
    end
    checks++;
    if (BRDT_W != PHT_IDX_W || GHR_W != 2 * BRDT_W || PC_W < PHT_IDX_W + 12 || 2**REG_W < NUM_REGS) begin
      failures++;
      $display("inconsistent default sizes");
    end
    checks++;
    if (2**PHT_IDX_W != 4096) begin
      failures++;
      $display("default PHT is not 4K entries");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
