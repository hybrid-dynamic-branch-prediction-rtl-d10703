// hdbp_sizes_tb: the predictor at the four table sizes 1K, 2K, 4K and 8K
// entries (N = 10..13), driven side by side with the same synthetic branch
// stream, next to a plain gshare model of the same size.
//
// The program has 400 static branches spread over a 64K-word code region,
// each reading one or two registers, and random register writes. For each
// size the test checks, every branch:
//  * the direction against a shadow counter table indexed by the
//    predictor's own index (so the table is trained and read correctly at
//    every size);
//  * that the folded path is taken exactly when the history length reaches
//    N.
// It also requires both index paths to be used at every size. It then
// prints, for the predictor and for gshare, the misprediction count and the
// aliasing count: a lookup that finds its counter last used by a different
// static branch. These are reported, not checked: a synthetic stream says
// little about the relative accuracy of the two schemes on real programs.
module hdbp_sizes_tb;
  localparam int unsigned NR = hdbp_pkg::NUM_REGS;
  localparam int unsigned PW = hdbp_pkg::PC_W;
  localparam int unsigned RW = $clog2(NR);
  localparam int NBR   = 400;
  localparam int STEPS = 40000;
  localparam int NCFG  = 4;
  localparam int MAXE  = 2**13;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          rst_n;
  logic [PW-1:0] pred_pc;
  logic          pred_src1_valid, pred_src2_valid;
  logic [RW-1:0] pred_src1, pred_src2;
  logic          upd_valid, upd_taken, wr_valid;
  logic [RW-1:0] wr_dst;

  logic [NCFG-1:0] ready, taken_o, fold_o;
  logic [12:0]     idx_o [NCFG];
  int              len_o [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned N = 10 + g;
    logic [N-1:0]            idx;
    logic [$clog2(N+1)-1:0]  len;
    hdbp #(.N(N)) dut (
      .clk, .rst_n, .ready(ready[g]),
      .pred_pc, .pred_src1_valid, .pred_src1, .pred_src2_valid, .pred_src2,
      .pred_taken(taken_o[g]), .pred_idx(idx), .pred_fold(fold_o[g]), .pred_hist_len(len),
      .upd_valid, .upd_idx(idx), .upd_taken,
      .wr_valid, .wr_dst
    );
    assign idx_o[g] = 13'(idx);
    assign len_o[g] = int'(len);
  end

  // shadow counters and last user of each entry, per size
  int            shadow [NCFG][MAXE];
  int            owner  [NCFG][MAXE];
  int            gs_ctr [NCFG][MAXE];
  int            gs_own [NCFG][MAXE];
  logic [25:0]   ghist;
  int mis [NCFG], alias_n [NCFG], gs_mis [NCFG], gs_alias [NCFG], n_fold [NCFG], n_dyn [NCFG];

  logic [PW-1:0] br_pc [NBR];
  logic [RW-1:0] br_s1 [NBR], br_s2 [NBR];
  bit            br_two [NBR];

  initial begin
    repeat (STEPS + 2**13 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit outcome(int b);
    case (b % 5)
      0: outcome = ghist[0] ^ ghist[2];
      1: outcome = 1'b1;
      2: outcome = ghist[1] | ($urandom_range(15, 0) == 0);
      3: outcome = 1'b0;
      default: outcome = ($urandom_range(3, 0) != 0);
    endcase
  endfunction

  initial begin
    int b, gi, n, i;
    bit t;
    for (int i = 0; i < NBR; i++) begin
      br_pc[i]  = PW'($urandom_range(65535, 0));
      br_s1[i]  = RW'($urandom_range((i % 3 == 0) ? NR - 1 : 23, 0));
      br_s2[i]  = RW'($urandom_range(NR - 1, 0));
      br_two[i] = $urandom_range(1, 0) == 1;
    end
    for (int c = 0; c < NCFG; c++) begin
      mis[c] = 0; alias_n[c] = 0; gs_mis[c] = 0; gs_alias[c] = 0; n_fold[c] = 0; n_dyn[c] = 0;
      for (int i = 0; i < MAXE; i++) begin
        shadow[c][i] = 1; owner[c][i] = -1; gs_ctr[c][i] = 1; gs_own[c][i] = -1;
      end
    end
    ghist = '0;
    rst_n = 1'b0;
    {pred_pc, pred_src1_valid, pred_src2_valid, pred_src1, pred_src2} = '0;
    {upd_valid, upd_taken, wr_valid, wr_dst} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&ready);

    for (int s = 0; s < STEPS; s++) begin
      @(negedge clk);
      wr_valid = $urandom_range(3, 0) != 0;
      wr_dst   = ($urandom_range(7, 0) == 0) ? RW'($urandom_range(NR - 1, 0)) : RW'($urandom_range(15, 0));
      upd_valid = $urandom_range(1, 0) == 1;
      b = $urandom_range(NBR - 1, 0);
      pred_pc         = br_pc[b];
      pred_src1_valid = 1'b1;
      pred_src1       = br_s1[b];
      pred_src2_valid = br_two[b];
      pred_src2       = br_s2[b];
      t = outcome(b);
      upd_taken = t;
      #1;
      for (int c = 0; c < NCFG; c++) begin
        n = 10 + c;
        i = int'(idx_o[c]);
        checks++;
        if (taken_o[c] !== (shadow[c][i] >= 2) || fold_o[c] !== (len_o[c] == n)) begin
          failures++;
          if (failures < 10)
            $display("N=%0d step %0d: taken %b fold %b len %0d, shadow counter %0d",
                     n, s, taken_o[c], fold_o[c], len_o[c], shadow[c][i]);
        end
        if (upd_valid) begin
          if (fold_o[c]) n_fold[c]++; else n_dyn[c]++;
          if (taken_o[c] != t) mis[c]++;
          if (owner[c][i] >= 0 && owner[c][i] != b) alias_n[c]++;
          owner[c][i] = b;
          if (t) shadow[c][i] = (shadow[c][i] == 3) ? 3 : shadow[c][i] + 1;
          else   shadow[c][i] = (shadow[c][i] == 0) ? 0 : shadow[c][i] - 1;
          // gshare reference: n history bits XOR n PC bits
          gi = int'((ghist ^ 26'(br_pc[b])) & ((26'd1 << n) - 26'd1));
          if ((gs_ctr[c][gi] >= 2) != t) gs_mis[c]++;
          if (gs_own[c][gi] >= 0 && gs_own[c][gi] != b) gs_alias[c]++;
          gs_own[c][gi] = b;
          if (t) gs_ctr[c][gi] = (gs_ctr[c][gi] == 3) ? 3 : gs_ctr[c][gi] + 1;
          else   gs_ctr[c][gi] = (gs_ctr[c][gi] == 0) ? 0 : gs_ctr[c][gi] - 1;
        end
      end
      @(posedge clk);
      if (upd_valid) ghist = {ghist[24:0], t};
    end

    for (int c = 0; c < NCFG; c++) begin
      $display("%0dK entries: HDBP mispredictions %0d aliasing %0d (folded %0d, dynamic %0d) | gshare mispredictions %0d aliasing %0d",
               2**c, mis[c], alias_n[c], n_fold[c], n_dyn[c], gs_mis[c], gs_alias[c]);
      checks++;
      if (n_fold[c] == 0 || n_dyn[c] == 0) begin
        failures++;
        $display("N=%0d: a path was never used", 10 + c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
