// tb_sbox_key_add: random shares.  For a random S-box value s, output mask
// u, key k and key mask w the core would deliver y_m = s ^ 8'h63 ^ u and
// y_mask = u; with key_m = k ^ w and key_mask = w the output must be s ^ k.
module tb_sbox_key_add;
  logic [7:0] y_m, y_mask, key_m, key_mask, out;
  int checks = 0, failures = 0;

  sbox_key_add dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] s, u, k, w;
    for (int n = 0; n < 5000; n++) begin
      s = 8'($urandom); u = 8'($urandom); k = 8'($urandom); w = 8'($urandom);
      if (n == 0) begin s = 8'h00; u = 8'h00; k = 8'h23; w = 8'h00; end
      y_m = s ^ 8'h63 ^ u; y_mask = u; key_m = k ^ w; key_mask = w;
      #1;
      checks++;
      if (out !== (s ^ k)) begin
        failures++;
        if (failures < 10) $display("FAIL s=%02h k=%02h out=%02h", s, k, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
