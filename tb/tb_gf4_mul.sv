// tb_gf4_mul: exhaustive check of the GF(2^2) multiplier (16 operand pairs)
// against polynomial multiplication modulo z^2+z+1.
module tb_gf4_mul;
  import aes_ref_pkg::*;
  logic [1:0] a, b, q;
  int checks = 0, failures = 0;

  gf4_mul dut (.a(a), .b(b), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        #1;
        checks++;
        if (q !== gf4_ref(a, b)) begin
          failures++;
          $display("FAIL %0d*%0d = %0d, expected %0d", a, b, q, gf4_ref(a, b));
        end
      end
    end
    // z has order 3: z*z*z = 1
    a = 2'b10; b = 2'b10; #1;
    a = q;     b = 2'b10; #1;
    checks++;
    if (q !== 2'b01) begin failures++; $display("FAIL z^3 = %0d", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
