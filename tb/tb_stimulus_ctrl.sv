// tb_stimulus_ctrl: REPEAT = 3.  Checks that the issued (a_m, m) sequence is
// a_m-major, m-minor, each pair exactly REPEAT times, that `pause` holds the
// sequence, that new_pair marks the first repetition, that done pulses once
// after the last stimulus and that the run takes 65536*REPEAT stimuli.
// A second run checks that start restarts from zero.
module tb_stimulus_ctrl;
  localparam int REPEAT = 3;
  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0, pause = 1'b0;
  logic       busy, valid, new_pair, done;
  logic [7:0] a_m, m;
  int checks = 0, failures = 0;
  int issued, exp_idx, pauses, dones, pairs;

  stimulus_ctrl #(.REPEAT(REPEAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_once(input int pause_every);
    int cyc;
    issued = 0; exp_idx = 0; pauses = 0; dones = 0; pairs = 0; cyc = 0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (dones == 0 && cyc < 300000) begin
      pause = (pause_every !== 0) && ((cyc % pause_every) == 5);
      #1;
      if (valid) begin
        int pair;
        pair = exp_idx / REPEAT;
        checks++;
        if ({a_m, m} !== 16'(pair) || new_pair !== ((exp_idx % REPEAT) == 0)) begin
          failures++;
          if (failures < 10) $display("FAIL stimulus %0d: a_m=%02h m=%02h new_pair=%0b", exp_idx, a_m, m, new_pair);
        end
        if (new_pair) pairs++;
        exp_idx++;
        issued++;
      end else if (busy && pause) begin
        pauses++;
      end
      @(posedge clk);
      #1;
      if (done) dones++;
      @(negedge clk);
      cyc++;
    end
    pause = 1'b0;
    checks++;
    if (issued !== 65536 * REPEAT || pairs !== 65536) begin
      failures++;
      $display("FAIL issued %0d stimuli, %0d pairs", issued, pairs);
    end
    checks++;
    if (busy !== 1'b0 || dones !== 1) begin failures++; $display("FAIL end of run busy=%0b dones=%0d", busy, dones); end
    @(negedge clk);
    checks++;
    if (done !== 1'b0) begin failures++; $display("FAIL done longer than one cycle"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    checks++;
    if (busy !== 1'b0 || valid !== 1'b0) begin failures++; $display("FAIL not idle after reset"); end
    run_once(17);
    checks++;
    if (pauses == 0) begin failures++; $display("FAIL pause never exercised"); end
    run_once(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
