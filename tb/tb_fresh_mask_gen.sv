// tb_fresh_mask_gen: compares the generator with a bit-level model of the
// Galois LFSR (x^32 + x^22 + x^2 + x + 1, 12 steps per output), checks that
// the output holds while `step` is low, and checks that over 1024 outputs the
// low 4 bits (the fresh mask) take every value with roughly equal frequency.
module tb_fresh_mask_gen;
  localparam logic [31:0] SEED = 32'h1ACE_B00C;
  logic        clk = 1'b0, rst_n = 1'b0, step = 1'b0;
  logic [11:0] mask_o;
  logic [31:0] model;
  int checks = 0, failures = 0;
  int hist [16];

  fresh_mask_gen #(.OUT_W(12), .SEED(SEED)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_step();
    for (int i = 0; i < 12; i++) begin
      logic fb = model[0];
      model = {1'b0, model[31:1]};
      if (fb) begin
        model[31] = ~model[31];
        model[21] = ~model[21];
        model[1]  = ~model[1];
        model[0]  = ~model[0];
      end
    end
  endtask

  initial begin
    model = SEED;
    foreach (hist[i]) hist[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (mask_o !== SEED[11:0]) begin failures++; $display("FAIL reset value"); end
    for (int n = 0; n < 2000; n++) begin
      step = (n % 7) !== 3;
      @(posedge clk);
      if (step) model_step();
      @(negedge clk);
      checks++;
      if (mask_o !== model[11:0]) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d got %03h expected %03h", n, mask_o, model[11:0]);
      end
      if (step && n < 1200) hist[mask_o[3:0]]++;
    end
    // ~1028 stepped outputs counted: expect each 4-bit value near 64
    foreach (hist[i]) begin
      checks++;
      if (hist[i] < 30 || hist[i] > 110) begin
        failures++;
        $display("FAIL value %0d occurs %0d times", i, hist[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
