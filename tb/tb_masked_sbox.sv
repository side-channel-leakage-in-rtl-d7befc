// tb_masked_sbox: exhaustive check of the masked S-box over all 2^20
// combinations of masked input a_m, mask m and fresh mask f.
// Per combination: y_m ^ y_mask ^ 8'h63 must equal the reference AES S-box of
// a = a_m ^ m.  Then the logic-level first-order check of the masked part:
// grouped by the unmasked input a, the number of logic-1s on both output
// shares summed over all (m, f) must be the same for every a, while the
// unmasked S-box output of course varies with a.  The same check is made bit
// by bit on the internal nodes (products, partial XOR sums and intermediate
// masked values of every masked multiplier and of the inverter): a node whose
// logic-1 count depends on a would leak in the first order even though the
// outputs do not.  Internal nodes are reached by hierarchical reference.
module tb_masked_sbox;
  import aes_ref_pkg::*;
  logic [7:0] a_m, m, y_m, y_mask;
  logic [3:0] f;
  logic [7:0] sbox_tab [256];
  longint ones_by_a [256];
  localparam int NW = 6*4 + 3*7*4 + 5*2 + 3*3*2;
  logic [NW-1:0] node;
  int node_ones [256][NW];
  int checks = 0, failures = 0;

  masked_sbox dut (.*);

  always_comb
    node = {dut.prod_m, dut.part_m, dut.d_m, dut.dinv_m, dut.ih_m, dut.il_m,
            dut.u_prod.i1, dut.u_prod.i2, dut.u_prod.i3, dut.u_prod.i4,
            dut.u_prod.s4, dut.u_prod.s3, dut.u_prod.s2,
            dut.u_hi.i1, dut.u_hi.i2, dut.u_hi.i3, dut.u_hi.i4,
            dut.u_hi.s4, dut.u_hi.s3, dut.u_hi.s2,
            dut.u_lo.i1, dut.u_lo.i2, dut.u_lo.i3, dut.u_lo.i4,
            dut.u_lo.s4, dut.u_lo.s3, dut.u_lo.s2,
            dut.u_inv.prod_m, dut.u_inv.part_m, dut.u_inv.e_m,
            dut.u_inv.qh_m, dut.u_inv.ql_m,
            dut.u_inv.u_prod.s4, dut.u_inv.u_prod.s3, dut.u_inv.u_prod.s2,
            dut.u_inv.u_hi.s4, dut.u_inv.u_hi.s3, dut.u_inv.u_hi.s2,
            dut.u_inv.u_lo.s4, dut.u_inv.u_lo.s3, dut.u_inv.u_lo.s2};

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] a;
    for (int i = 0; i < 256; i++) begin
      sbox_tab[i] = aes_sbox(8'(i));
      ones_by_a[i] = 0;
      for (int k = 0; k < NW; k++) node_ones[i][k] = 0;
    end
    // sanity of the reference itself (FIPS-197 values)
    checks++;
    if (sbox_tab[8'h00] !== 8'h63 || sbox_tab[8'h01] !== 8'h7c || sbox_tab[8'h53] !== 8'hed) begin
      failures++;
      $display("FAIL reference S-box");
    end
    for (int n = 0; n < (1 << 20); n++) begin
      {a_m, m, f} = 20'(n);
      #1;
      a = a_m ^ m;
      checks++;
      if ((y_m ^ y_mask ^ 8'h63) !== sbox_tab[a]) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%02h m=%02h f=%0h: got %02h expected %02h", a, m, f,
                   y_m ^ y_mask ^ 8'h63, sbox_tab[a]);
      end
      ones_by_a[a] += longint'($countones(y_m) + $countones(y_mask));
      for (int k = 0; k < NW; k++) node_ones[a][k] += int'(node[k]);
    end
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (ones_by_a[i] !== ones_by_a[0]) begin
        failures++;
        $display("FAIL masked logic-1 count for a=%02h: %0d vs %0d", i, ones_by_a[i], ones_by_a[0]);
      end
    end
    $display("masked-part logic-1 count per unmasked input: %0d", ones_by_a[0]);
    for (int k = 0; k < NW; k++) begin
      int bad;
      bad = 0;
      checks++;
      for (int i = 1; i < 256; i++)
        if (node_ones[i][k] !== node_ones[0][k]) bad++;
      if (bad !== 0) begin
        failures++;
        $display("FAIL internal node bit %0d: logic-1 count depends on a (%0d of 255 inputs differ)", k, bad);
      end
    end
    $display("internal node bits checked: %0d", NW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
