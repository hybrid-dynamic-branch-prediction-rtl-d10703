// hdbp_tb: end-to-end test of the hybrid predictor at its default sizes
// (4K-entry PHT, 12-bit BRDT, 24-bit global history, 64 registers).
//
// A small synthetic program is run: 24 static branches, each reading one or
// two registers, interleaved with register writes. Writes favour a pool
// of 16 registers, so some branch operands are rewritten often (short
// correlated history) and others rarely (far dependency, folded path). Outcomes follow rules that correlate each branch with
// recent history, so counters train and saturate. Every prediction (index,
// direction, path, history length) is compared with an independent model
// of the whole predictor: the BRDT as per-register sets of branch
// distances, the global history as a bit queue and the PHT as an integer
// array. The test also counts how often each mechanism occurred -- the
// dynamic-length path with an empty and with a partial mask, the
// folded-history path, the sticky far-dependency bit, a write coinciding
// with a branch, and both counter saturation limits -- and fails if any of
// them never happened.
module hdbp_tb;
  import hdbp_pkg::*;
  localparam int unsigned N  = hdbp_pkg::PHT_IDX_W;
  localparam int unsigned NR = hdbp_pkg::NUM_REGS;
  localparam int unsigned PW = hdbp_pkg::PC_W;
  localparam int unsigned RW = $clog2(NR);
  localparam int unsigned LW = $clog2(N + 1);
  localparam int NBR = 24;
  localparam int STEPS = 30000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          rst_n, ready;
  logic [PW-1:0] pred_pc;
  logic          pred_src1_valid, pred_src2_valid, pred_taken, pred_fold;
  logic [RW-1:0] pred_src1, pred_src2;
  logic [N-1:0]  pred_idx, upd_idx;
  logic [LW-1:0] pred_hist_len;
  logic          upd_valid, upd_taken;
  logic          wr_valid;
  logic [RW-1:0] wr_dst;

  hdbp dut (.*);

  // ---- model ----
  bit          dep [NR][N];
  bit [2*N-1:0] mghr;
  int          mpht [2**N];

  // ---- the synthetic program ----
  logic [PW-1:0] br_pc [NBR];
  logic [RW-1:0] br_s1 [NBR], br_s2 [NBR];
  bit            br_two [NBR];

  // ---- mechanism counters ----
  int n_empty = 0, n_partial = 0, n_fold = 0, n_sticky = 0;
  int n_wr_br = 0, n_sat_hi = 0, n_sat_lo = 0, n_branches = 0, n_correct = 0;

  initial begin
    repeat (STEPS + 2**N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit outcome(int b);
    // Branch b repeats a pattern tied to its own recent outcomes and to
    // those of other branches; some branches are almost always taken.
    case (b % 4)
      0: outcome = mghr[0] ^ mghr[3];
      1: outcome = 1'b1;
      2: outcome = mghr[1] | ($urandom_range(9, 0) == 0);
      default: outcome = ($urandom_range(3, 0) != 0);
    endcase
  endfunction

  initial begin
    int b, msb;
    bit [N-1:0] e_entry, e_idx;
    bit e_fold, taken;
    bit nd [NR][N];
    bit wd [N];

    for (int i = 0; i < NBR; i++) begin
      br_pc[i]  = PW'($urandom);
      br_s1[i]  = RW'($urandom_range((i % 3 == 0) ? NR - 1 : 23, 0));
      br_s2[i]  = RW'($urandom_range(NR - 1, 0));
      br_two[i] = $urandom_range(1, 0) == 1;
    end
    for (int i = 0; i < 2**N; i++) mpht[i] = 1;
    mghr = '0;

    rst_n = 1'b0;
    {pred_pc, pred_src1_valid, pred_src2_valid, pred_src1, pred_src2} = '0;
    {upd_valid, upd_taken, upd_idx} = '0;
    {wr_valid, wr_dst} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (ready);

    for (int t = 0; t < STEPS; t++) begin
      @(negedge clk);
      // a register write in most cycles, mostly to registers 0-15
      wr_valid      = $urandom_range(3, 0) != 0;
      wr_dst        = ($urandom_range(7, 0) == 0) ? RW'($urandom_range(NR - 1, 0)) : RW'($urandom_range(15, 0));
      // a branch in about half of the cycles
      upd_valid = $urandom_range(1, 0) == 1;
      b = $urandom_range(NBR - 1, 0);
      pred_pc         = br_pc[b];
      pred_src1_valid = 1'b1;
      pred_src1       = br_s1[b];
      pred_src2_valid = br_two[b];
      pred_src2       = br_s2[b];
      #1;
      // expected prediction
      for (int d = 0; d < int'(N); d++)
        e_entry[d] = dep[br_s1[b]][d] || (br_two[b] && dep[br_s2[b]][d]);
      msb = -1;
      for (int d = 0; d < int'(N); d++) if (e_entry[d]) msb = d;
      e_fold = (msb == int'(N) - 1);
      for (int i = 0; i < int'(N); i++) begin
        if (e_fold)
          e_idx[i] = mghr[i] ^ mghr[i + N] ^ pred_pc[i] ^ pred_pc[i + 4] ^ pred_pc[i + 12];
        else
          e_idx[i] = (i <= msb ? mghr[i] : pred_pc[N + i]) ^ pred_pc[i] ^ pred_pc[i + 4];
      end
      checks++;
      if (pred_idx !== e_idx || pred_fold !== e_fold || int'(pred_hist_len) != msb + 1 ||
          pred_taken !== (mpht[e_idx] >= 2)) begin
        failures++;
        if (failures < 10)
          $display("step %0d br %0d: idx %h fold %b len %0d taken %b, expected %h %b %0d %b",
                   t, b, pred_idx, pred_fold, pred_hist_len, pred_taken,
                   e_idx, e_fold, msb + 1, mpht[e_idx] >= 2);
      end
      if (upd_valid) begin
        if (e_fold) n_fold++;
        else if (msb < 0) n_empty++;
        else n_partial++;
      end
      // resolve the branch in the same cycle
      taken     = outcome(b);
      upd_taken = taken;
      upd_idx   = e_idx;
      if (upd_valid) begin
        n_branches++;
        if (pred_taken == taken) n_correct++;
        if (wr_valid) n_wr_br++;
      end
      // model update for the coming clock edge
      for (int d = 0; d < int'(N); d++)
        wd[d] = (d == 0);
      nd = dep;
      if (wr_valid) nd[wr_dst] = wd;
      if (upd_valid) begin
        for (int r = 0; r < int'(NR); r++) begin
          bit o [N];
          o = nd[r];
          nd[r] = '{default: 0};
          for (int d = 0; d < int'(N); d++) if (o[d]) begin
            if (d + 1 >= int'(N)) begin
              nd[r][N-1] = 1;
              if (d == int'(N) - 1) n_sticky++;
            end else nd[r][d+1] = 1;
          end
        end
        if (taken) begin
          if (mpht[e_idx] == 3) n_sat_hi++; else mpht[e_idx]++;
        end else begin
          if (mpht[e_idx] == 0) n_sat_lo++; else mpht[e_idx]--;
        end
      end
      @(posedge clk);
      dep = nd;
      if (upd_valid) mghr = {mghr[2*N-2:0], taken};
    end

    $display("branches %0d, correct %0d", n_branches, n_correct);
    $display("dynamic path: empty mask %0d, partial mask %0d; folded path %0d",
             n_empty, n_partial, n_fold);
    $display("sticky far dependencies %0d, write with branch %0d, saturations T %0d NT %0d",
             n_sticky, n_wr_br, n_sat_hi, n_sat_lo);
    checks++; if (n_empty    == 0) begin failures++; $display("never: empty mask"); end
    checks++; if (n_partial  == 0) begin failures++; $display("never: partial mask"); end
    checks++; if (n_fold     == 0) begin failures++; $display("never: folded path"); end
    checks++; if (n_sticky   == 0) begin failures++; $display("never: sticky far dependency"); end
    checks++; if (n_wr_br    == 0) begin failures++; $display("never: write with branch"); end
    checks++; if (n_sat_hi   == 0) begin failures++; $display("never: saturation taken"); end
    checks++; if (n_sat_lo   == 0) begin failures++; $display("never: saturation not taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
