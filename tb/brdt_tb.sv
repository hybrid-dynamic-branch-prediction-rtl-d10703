// brdt_tb: random register writes, branches and lookups against a model.
// The model keeps, for every register, the set of distances (in branches)
// to the block of its latest write: a write makes the set {0}, a branch
// adds one to every distance and clamps it at
// WIDTH-1. A lookup is the union of the two sources' sets. The counts of
// clamped distances and of writes that coincide with a branch show that
// both cases were exercised.
module brdt_tb;
  localparam int unsigned NR = hdbp_pkg::NUM_REGS;
  localparam int unsigned W  = hdbp_pkg::BRDT_W;
  localparam int unsigned RW = $clog2(NR);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          rst_n, wr_valid, br_age;
  logic          rd_src1_valid, rd_src2_valid;
  logic [RW-1:0] wr_dst, rd_src1, rd_src2;
  logic [W-1:0]  rd_entry;

  brdt dut (.*);

  bit dep [NR][W];   // dep[r][d]: register r depends on the block d branches back
  int clamped = 0, wr_and_br = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit nd [NR][W];
    bit wd [W];
    logic [W-1:0] exp;
    rst_n = 1'b0;
    {wr_valid, br_age, rd_src1_valid, rd_src2_valid} = '0;
    {wr_dst, rd_src1, rd_src2} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 8000; t++) begin
      @(negedge clk);
      wr_valid      = $urandom_range(2, 0) != 0;
      wr_dst        = RW'($urandom);
      br_age        = $urandom_range(2, 0) == 0;
      rd_src1_valid = $urandom_range(7, 0) != 0;
      rd_src1       = RW'($urandom);
      rd_src2_valid = $urandom_range(1, 0) == 1;
      rd_src2       = RW'($urandom);
      #1;
      exp = '0;
      for (int d = 0; d < int'(W); d++)
        exp[d] = (rd_src1_valid && dep[rd_src1][d]) || (rd_src2_valid && dep[rd_src2][d]);
      checks++;
      if (rd_entry !== exp) begin
        failures++;
        if (failures < 10) $display("cycle %0d: entry %b expected %b", t, rd_entry, exp);
      end
      // model update at the clock edge
      for (int d = 0; d < int'(W); d++)
        wd[d] = (d == 0);
      nd = dep;
      if (wr_valid) nd[wr_dst] = wd;
      if (br_age) begin
        if (wr_valid) wr_and_br++;
        for (int r = 0; r < int'(NR); r++) begin
          bit o [W];
          o = nd[r];
          nd[r] = '{default: 0};
          for (int d = 0; d < int'(W); d++) if (o[d]) begin
            if (d + 1 >= int'(W)) begin nd[r][W-1] = 1; clamped++; end
            else nd[r][d+1] = 1;
          end
        end
      end
      @(posedge clk);
      dep = nd;
    end
    checks++;
    if (clamped == 0 || wr_and_br == 0) begin
      failures++;
      $display("not exercised: clamped %0d write+branch %0d", clamped, wr_and_br);
    end
    $display("clamped distances %0d, writes together with a branch %0d", clamped, wr_and_br);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
