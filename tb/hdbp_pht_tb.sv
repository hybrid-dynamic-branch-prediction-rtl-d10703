// hdbp_pht_tb: the 4K-entry counter table against an integer model.
// After reset, ready must rise exactly 2^N cycles later (one entry
// initialised per cycle) and every counter must read weakly not taken. Random updates,
// concentrated on a few hot entries so that both saturation limits are
// reached often, are mirrored in the model, and random reads compare the
// counter value and the predicted direction.
module hdbp_pht_tb;
  import hdbp_pkg::*;
  localparam int unsigned N = hdbp_pkg::PHT_IDX_W;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         rst_n, ready, rd_taken, upd_valid, upd_taken;
  logic [N-1:0] rd_idx, upd_idx;
  ctr_t         rd_ctr;

  hdbp_pht dut (.clk, .rst_n, .ready, .rd_idx, .rd_taken, .rd_ctr, .upd_valid, .upd_idx, .upd_taken);

  int model [2**N];
  int sat_hi = 0, sat_lo = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input logic [N-1:0] i);
    rd_idx = i;
    #1;
    checks++;
    if (int'(rd_ctr) != model[i] || rd_taken !== (model[i] >= 2)) begin
      failures++;
      if (failures < 10) $display("entry %0d: ctr %0d taken %b, expected %0d", i, rd_ctr, rd_taken, model[i]);
    end
  endtask

  initial begin
    rst_n = 1'b0; upd_valid = 1'b0; upd_taken = 1'b0; upd_idx = '0; rd_idx = '0;
    for (int i = 0; i < 2**N; i++) model[i] = 1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    begin
      int cycles = 0;
      // updates offered during initialisation must be dropped
      upd_valid = 1'b1; upd_taken = 1'b1; upd_idx = '0;
      while (!ready) begin
        @(posedge clk); #1;
        cycles++;
      end
      upd_valid = 1'b0;
      checks++;
      if (cycles != 2**N) begin
        failures++;
        $display("ready after %0d cycles, expected %0d", cycles, 2**N);
      end
    end
    for (int i = 0; i < 2**N; i += 7) check_read(N'(i));
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      upd_valid = $urandom_range(4, 0) != 0;
      upd_idx   = ($urandom_range(1, 0) == 1) ? N'($urandom_range(7, 0)) : N'($urandom);
      upd_taken = $urandom_range(1, 0) == 1;
      @(posedge clk);
      if (upd_valid) begin
        if (upd_taken) begin
          if (model[upd_idx] == 3) sat_hi++; else model[upd_idx]++;
        end else begin
          if (model[upd_idx] == 0) sat_lo++; else model[upd_idx]--;
        end
      end
      #1;
      upd_valid = 1'b0;
      check_read(upd_idx);
      check_read(N'($urandom));
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin
      failures++;
      $display("saturation not exercised: hi %0d lo %0d", sat_hi, sat_lo);
    end
    $display("saturations: taken %0d not-taken %0d", sat_hi, sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
