// tb_masked_sbox_top_full: the device under test with every parameter at its
// default (five dual-rail S-boxes, key 8'h23, 1024 repetitions per pair).
// It runs the measurement sequence through its first STOP_PAIRS = 4096 pairs
// (all 256 masks for a_m = 0..15), each with all 1024 repetitions: 4,194,304
// stimuli.  The whole 65536-pair run is 16 times longer at this
// simulation speed; tb_masked_sbox_top runs a whole sequence with 2
// repetitions and tb_masked_sbox_top_single the whole default-length
// sequence with single-rail S-boxes.
//
// Checks: pair order, all S-box outputs against AES_Sbox(a_m ^ m) ^ 8'h23,
// three-cycle latency, and counts of pauses, pre-charge cycles, first-of-pair
// markers, mask wrap-arounds, fresh-mask variation within a pair and
// fresh-mask coverage.
module tb_masked_sbox_top_full;
  import aes_ref_pkg::*;
  localparam int REPEAT = 1024;
  localparam int N_SBOX = 5;
  localparam int PAUSE_EVERY = 1000;
  localparam int STOP_PAIRS = 4096;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0, pause = 1'b0;
  logic       busy, done, out_valid, out_new_pair;
  logic [7:0] out_a_m, out_m;
  logic [7:0] sbox_out [N_SBOX];

  masked_sbox_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] sbox_tab [256];
  longint cyc = 0;
  longint issue_q [$];
  int n_prech = 0, n_out = 0, n_pause = 0, n_new_pair = 0, n_wrap = 0, n_done = 0, n_fvar = 0;
  bit f_seen [16];
  logic [3:0] pair_f;
  bit pair_fvar;

  initial begin
    #(64'd10 * 64'd16000000);
    failures++;
    $display("watchdog expired after %0d results", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // Record when each stimulus is issued and which fresh masks are used.
  always @(posedge clk) if (rst_n) begin
    if (dut.stim_valid) issue_q.push_back(cyc);
    if (dut.phase == 2'd1) n_prech++;
    if (dut.eval) begin
      f_seen[dut.in_f] = 1'b1;
      if (dut.in_new_pair) begin
        if (pair_fvar) n_fvar++;
        pair_f = dut.in_f;
        pair_fvar = 1'b0;
      end else if (dut.in_f !== pair_f) pair_fvar = 1'b1;
    end
    if (busy && pause) n_pause++;
    if (done) n_done++;
  end

  // Check every result.
  always @(posedge clk) if (rst_n && out_valid) begin
    int idx;
    logic [15:0] exp_pair;
    longint t_issue;
    idx      = n_out;
    exp_pair = 16'(idx / REPEAT);
    t_issue  = issue_q.pop_front();
    checks++;
    if (cyc - t_issue !== 3) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d for result %0d", cyc - t_issue, idx);
    end
    checks++;
    if ({out_a_m, out_m} !== exp_pair || out_new_pair !== ((idx % REPEAT) == 0)) begin
      failures++;
      if (failures < 10) $display("FAIL order at %0d: a_m=%02h m=%02h", idx, out_a_m, out_m);
    end
    for (int i = 0; i < N_SBOX; i++) begin
      checks++;
      if (sbox_out[i] !== (sbox_tab[out_a_m ^ out_m] ^ 8'h23)) begin
        failures++;
        if (failures < 10) $display("FAIL S-box %0d: a=%02h out=%02h", i, out_a_m ^ out_m, sbox_out[i]);
      end
    end
    if (out_new_pair) n_new_pair++;
    if (out_new_pair && out_m == 8'h00 && out_a_m !== 8'h00) n_wrap++;
    n_out++;
  end

  initial begin
    for (int i = 0; i < 256; i++) sbox_tab[i] = aes_sbox(8'(i));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done && n_out < STOP_PAIRS * REPEAT) begin
      @(negedge clk);
      pause = ($urandom_range(PAUSE_EVERY - 1) == 0);
    end
    pause = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (n_out < STOP_PAIRS * REPEAT) begin failures++; $display("FAIL %0d results", n_out); end
    checks++;
    if (n_pause == 0) begin failures++; $display("FAIL pause never happened"); end
    checks++;
    if (n_new_pair < STOP_PAIRS) begin failures++; $display("FAIL %0d new-pair markers", n_new_pair); end
    checks++;
    if (n_wrap < STOP_PAIRS / 256 - 1) begin failures++; $display("FAIL %0d mask wrap-arounds", n_wrap); end
    checks++;
    if (n_prech < n_out) begin failures++; $display("FAIL %0d pre-charge cycles for %0d results", n_prech, n_out); end
    checks++;
    if (n_fvar == 0) begin failures++; $display("FAIL fresh mask never changed within a pair"); end
    foreach (f_seen[i]) begin
      checks++;
      if (!f_seen[i]) begin failures++; $display("FAIL fresh mask %0d never used", i); end
    end
    $display("precharge=%0d results=%0d pauses=%0d new_pair=%0d mask_wraps=%0d fresh_mask_varied=%0d done=%0d",
             n_prech, n_out, n_pause, n_new_pair, n_wrap, n_fvar, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
