// tb_masked_gf4_mul: all 1024 combinations of the five 2-bit inputs
// (a_m, b_m, m_a, m_b, m_q).  For each it checks q_m ^ m_q = a*b with
// a = a_m ^ m_a, b = b_m ^ m_b.  It then checks the logic-level masking
// condition on the output: for every unmasked pair (a, b) the number of
// logic-1s on q_m, summed over all 64 mask combinations, is the same, and so
// is the mean per Hamming weight (0..4) of the unmasked inputs.
module tb_masked_gf4_mul;
  import aes_ref_pkg::*;
  logic [1:0] a_m, b_m, m_a, m_b, m_q, q_m;
  int checks = 0, failures = 0;
  int ones [4][4];
  int hw_ones [5], hw_n [5];

  masked_gf4_mul dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] a, b;
    foreach (ones[i, j]) ones[i][j] = 0;
    foreach (hw_ones[i]) begin hw_ones[i] = 0; hw_n[i] = 0; end
    for (int n = 0; n < 1024; n++) begin
      {a_m, b_m, m_a, m_b, m_q} = 10'(n);
      #1;
      a = a_m ^ m_a;
      b = b_m ^ m_b;
      checks++;
      if ((q_m ^ m_q) !== gf4_ref(a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d masks=%0d,%0d,%0d q_m=%0d", a, b, m_a, m_b, m_q, q_m);
      end
      ones[a][b] += int'(q_m[0]) + int'(q_m[1]);
      hw_ones[$countones({a, b})] += int'(q_m[0]) + int'(q_m[1]);
      hw_n[$countones({a, b})]++;
    end
    foreach (ones[i, j]) begin
      checks++;
      if (ones[i][j] !== ones[0][0]) begin
        failures++;
        $display("FAIL output ones for a=%0d b=%0d: %0d vs %0d", i, j, ones[i][j], ones[0][0]);
      end
    end
    for (int h = 0; h < 5; h++) begin
      checks++;
      // mean ones per evaluation must be 1 (uniform 2-bit output): sum == n
      if (hw_ones[h] !== hw_n[h]) begin
        failures++;
        $display("FAIL HW group %0d: %0d ones in %0d evaluations", h, hw_ones[h], hw_n[h]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
