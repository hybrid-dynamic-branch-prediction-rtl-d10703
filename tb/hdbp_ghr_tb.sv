// hdbp_ghr_tb: the global history is compared, after every cycle, with a
// queue of the outcomes shifted in (newest at bit 0). Cycles without
// upd_valid must leave it unchanged; reset must clear it.
module hdbp_ghr_tb;
  localparam int unsigned W = hdbp_pkg::GHR_W;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         rst_n, upd_valid, upd_taken;
  logic [W-1:0] ghr;

  hdbp_ghr dut (.clk, .rst_n, .upd_valid, .upd_taken, .ghr);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hist[$];
    logic [W-1:0] exp;
    rst_n = 1'b0; upd_valid = 1'b0; upd_taken = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (ghr !== '0) begin failures++; $display("not cleared by reset"); end
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      upd_valid = ($urandom_range(3, 0) != 0);
      upd_taken = $urandom_range(1, 0) == 1;
      @(posedge clk);
      if (upd_valid) hist.push_front(upd_taken);
      #1;
      exp = '0;
      for (int i = 0; i < int'(W) && i < hist.size(); i++) exp[i] = hist[i];
      checks++;
      if (ghr !== exp) begin
        failures++;
        if (failures < 10) $display("cycle %0d: ghr %h expected %h", t, ghr, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
