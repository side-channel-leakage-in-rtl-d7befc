// tb_wddl_masked_sbox: exhaustive check of the dual-rail masked S-box over
// all 2^20 combinations of (a_m, m, f), each applied as a pre-charge phase
// followed by an evaluation phase.
// In pre-charge every output rail must be 0.  In evaluation every rail pair
// must be complementary, y_m ^ y_mask ^ 8'h63 (true rails) must equal the
// reference AES S-box of a = a_m ^ m, and exactly 16 output rails must be
// high, whatever the data.  The masked part's logic-1 count per unmasked
// input a (true rails of both shares, summed over m and f) must not depend
// on a.  The internal nodes (products, partial XOR sums, intermediate masked
// values, both rails of each, reached by hierarchical reference) must all be
// 0 in pre-charge and must each, rail by rail, have a logic-1 count that does
// not depend on a.
module tb_wddl_masked_sbox;
  import aes_ref_pkg::*;
  import wddl_pkg::*;
  dr256_t a_m, m, y_m, y_mask;
  dr16_t  f;
  logic [7:0] sbox_tab [256];
  longint ones_by_a [256];
  localparam int NW = 2 * (6*4 + 3*7*4 + 5*2 + 3*3*2);
  logic [NW-1:0] node;
  int node_ones [256][NW];
  int checks = 0, failures = 0;

  wddl_masked_sbox dut (.*);

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
    for (int k = 0; k < NW; k++) begin
      int bad;
      bad = 0;
      checks++;
      for (int i = 1; i < 256; i++)
        if (node_ones[i][k] !== node_ones[0][k]) bad++;
      if (bad !== 0) begin
        failures++;
        $display("FAIL internal rail %0d: logic-1 count depends on a (%0d of 255 inputs differ)", k, bad);
      end
    end
    $display("internal rails checked: %0d", NW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] t_rails(dr256_t v);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = v[i].t;
    return r;
  endfunction

  function automatic logic [7:0] f_rails(dr256_t v);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = v[i].f;
    return r;
  endfunction

  initial begin
    logic [7:0] a, va, vm, ym, yk;
    logic [3:0] vf;
    for (int i = 0; i < 256; i++) begin
      sbox_tab[i] = aes_sbox(8'(i));
      ones_by_a[i] = 0;
      for (int k = 0; k < NW; k++) node_ones[i][k] = 0;
    end
    for (int n = 0; n < (1 << 20); n++) begin
      {va, vm, vf} = 20'(n);
      a = va ^ vm;
      // pre-charge
      a_m = '0; m = '0; f = '0;
      #1;
      checks++;
      if (y_m !== '0 || y_mask !== '0) begin
        failures++;
        if (failures < 10) $display("FAIL pre-charge outputs not zero");
      end
      checks++;
      if (node !== '0) begin
        failures++;
        if (failures < 10) $display("FAIL pre-charge internal nodes not zero");
      end
      // evaluate
      a_m = dr_encode8(va, 1'b1);
      m   = dr_encode8(vm, 1'b1);
      f   = dr_encode4(vf, 1'b1);
      #1;
      ym = t_rails(y_m);
      yk = t_rails(y_mask);
      checks++;
      if ((ym ^ f_rails(y_m)) !== 8'hff || (yk ^ f_rails(y_mask)) !== 8'hff) begin
        failures++;
        if (failures < 10) $display("FAIL rails not complementary for a_m=%02h m=%02h f=%0h", va, vm, vf);
      end
      checks++;
      if ((ym ^ yk ^ 8'h63) !== sbox_tab[a]) begin
        failures++;
        if (failures < 10) $display("FAIL a=%02h m=%02h f=%0h: got %02h expected %02h", a, vm, vf, ym ^ yk ^ 8'h63, sbox_tab[a]);
      end
      checks++;
      if ($countones(y_m) + $countones(y_mask) !== 16) begin
        failures++;
        if (failures < 10) $display("FAIL %0d rails high", $countones(y_m) + $countones(y_mask));
      end
      ones_by_a[a] += longint'($countones(ym) + $countones(yk));
      for (int k = 0; k < NW; k++) node_ones[a][k] += int'(node[k]);
    end
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (ones_by_a[i] !== ones_by_a[0]) begin
        failures++;
        $display("FAIL masked logic-1 count for a=%02h: %0d vs %0d", i, ones_by_a[i], ones_by_a[0]);
      end
    end
    for (int k = 0; k < NW; k++) begin
      int bad;
      bad = 0;
      checks++;
      for (int i = 1; i < 256; i++)
        if (node_ones[i][k] !== node_ones[0][k]) bad++;
      if (bad !== 0) begin
        failures++;
        $display("FAIL internal rail %0d: logic-1 count depends on a (%0d of 255 inputs differ)", k, bad);
      end
    end
    $display("internal rails checked: %0d", NW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
