// tb_masked_sbox_top: end-to-end run of the device under test with the
// repetition count reduced to REPEAT = 2 (131072 stimuli).
//
// For every result it checks the pair order (a_m-major, m-minor, each pair
// REPEAT times), that all N_SBOX outputs equal AES_Sbox(a_m ^ m) ^ 8'h23,
// and that each result arrives exactly three cycles after its stimulus was
// issued (pre-charge cycle, evaluation cycle, output register).  It counts
// and requires: pause cycles, one pre-charge cycle per result, first-of-pair
// markers, mask wrap-arounds (m 255 -> 0 with a_m stepping), a pair seeing
// different fresh masks over its repetitions, all 16 fresh-mask values, and
// the done pulse.
module tb_masked_sbox_top;
  import aes_ref_pkg::*;
  localparam int REPEAT = 2;
  localparam int N_SBOX = 5;
  localparam int PAUSE_EVERY = 37;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0, pause = 1'b0;
  logic       busy, done, out_valid, out_new_pair;
  logic [7:0] out_a_m, out_m;
  logic [7:0] sbox_out [N_SBOX];

  masked_sbox_top #(.REPEAT(REPEAT)) dut (.*);

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
    #(64'd10 * 64'd800000);
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
    while (!done) begin
      @(negedge clk);
      pause = ($urandom_range(PAUSE_EVERY - 1) == 0);
    end
    pause = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (n_out !== 65536 * REPEAT) begin failures++; $display("FAIL %0d results", n_out); end
    checks++;
    if (busy !== 1'b0 || issue_q.size() !== 0) begin failures++; $display("FAIL not idle at end"); end
    checks++;
    if (n_pause == 0) begin failures++; $display("FAIL pause never happened"); end
    checks++;
    if (n_new_pair !== 65536) begin failures++; $display("FAIL %0d new-pair markers", n_new_pair); end
    checks++;
    if (n_wrap !== 255) begin failures++; $display("FAIL %0d mask wrap-arounds", n_wrap); end
    checks++;
    if (n_prech !== n_out) begin failures++; $display("FAIL %0d pre-charge cycles for %0d results", n_prech, n_out); end
    checks++;
    if (n_done !== 1) begin failures++; $display("FAIL %0d done pulses", n_done); end
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
