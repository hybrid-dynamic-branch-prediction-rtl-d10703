// hdbp_dyn_index_tb: random check of the dynamic-length index path.
// The expected new BHR and index are built bit by bit: a history bit is
// kept where the mask is 1, the matching upper PC bit is used where it is
// 0, and the index bit XORs that with PC bits i and i+4.
module hdbp_dyn_index_tb;
  localparam int unsigned N  = hdbp_pkg::PHT_IDX_W;
  localparam int unsigned PW = hdbp_pkg::PC_W;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [N-1:0]  ghr_low, mask, new_bhr, idx;
  logic [PW-1:0] pc;

  hdbp_dyn_index dut (.ghr_low, .mask, .pc, .new_bhr, .idx);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] eb, ei;
    int len;
    for (int t = 0; t < 5000; t++) begin
      ghr_low = N'($urandom);
      pc      = PW'($urandom);
      len     = $urandom_range(N, 0);
      mask    = '0;
      for (int i = 0; i < len; i++) mask[i] = 1'b1;
      @(posedge clk);
      for (int i = 0; i < int'(N); i++) begin
        eb[i] = mask[i] ? ghr_low[i] : pc[N + i];
        ei[i] = eb[i] ^ pc[i] ^ pc[i + 4];
      end
      checks++;
      if (new_bhr !== eb || idx !== ei) begin
        failures++;
        if (failures < 10)
          $display("ghr %h mask %h pc %h: bhr %h idx %h, expected %h %h",
                   ghr_low, mask, pc, new_bhr, idx, eb, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
