// hdbp_fold_index_tb: random check of the folded-history (modified gshare)
// index. Expected values are built bit by bit: history bits i and i+N are
// XORed, then PC bits i, i+4 and i+12.
module hdbp_fold_index_tb;
  localparam int unsigned N  = hdbp_pkg::PHT_IDX_W;
  localparam int unsigned PW = hdbp_pkg::PC_W;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [2*N-1:0] ghr;
  logic [PW-1:0]  pc;
  logic [N-1:0]   folded, idx;

  hdbp_fold_index dut (.ghr, .pc, .folded, .idx);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] ef, ei;
    for (int t = 0; t < 5000; t++) begin
      ghr = (2*N)'({$urandom, $urandom});
      pc  = PW'($urandom);
      @(posedge clk);
      for (int i = 0; i < int'(N); i++) begin
        ef[i] = ghr[i] ^ ghr[i + N];
        ei[i] = ef[i] ^ pc[i] ^ pc[i + 4] ^ pc[i + 12];
      end
      checks++;
      if (folded !== ef || idx !== ei) begin
        failures++;
        if (failures < 10)
          $display("ghr %h pc %h: folded %h idx %h, expected %h %h", ghr, pc, folded, idx, ef, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
