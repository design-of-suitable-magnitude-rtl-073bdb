// tb_mag_comp64_tree: self-checking test of the tree 64-bit comparator at its
// default width.
//
// For every bit position k (0..63) the test applies 40 operand pairs that
// first differ at bit k, half with A>B and half with A<B, then 200 equal
// pairs and 2000 fully random pairs. Each result {gt, eq, lt} is compared
// with integer comparison of the operands. The design is combinational, so
// each vector is given 1 time unit to settle. The test also counts, per
// 4-bit nibble, how often the decision fell in that nibble, and fails if
// any nibble or the equal case was never exercised.
module tb_mag_comp64_tree
  import mag_comp_pkg::*;
  import tb_cmp_pkg::*;
;

  int checks = 0;
  int failures = 0;
  int nibble_hits [W/4 + 1];   // last entry: operands equal

  logic [W-1:0] a, b;
  cmp_result_t  res, exp;

  mag_comp64_tree dut (.a(a), .b(b), .res(res));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [W-1:0] va, logic [W-1:0] vb);
    int msd;
    a = va;
    b = vb;
    #1;
    exp = ref_cmp(va, vb);
    msd = -1;
    for (int i = 0; i < W; i++) if (va[i] != vb[i]) msd = i;
    nibble_hits[(msd < 0) ? W/4 : msd/4]++;
    checks++;
    if (res !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h: got %b expected %b", va, vb, res, exp);
    end
  endtask

  initial begin
    logic [W-1:0] va, vb;
    foreach (nibble_hits[i]) nibble_hits[i] = 0;
    for (int k = 0; k < W; k++)
      for (int n = 0; n < 40; n++) begin
        make_pair(k, va, vb);
        if (n % 2 == 0) apply(va, vb); else apply(vb, va);
      end
    for (int n = 0; n < 200; n++) begin
      make_pair(-1, va, vb);
      apply(va, vb);
    end
    apply('0, '0);
    apply('1, '1);
    apply('1, '0);
    apply('0, '1);
    for (int n = 0; n < 2000; n++) apply(rand_word(), rand_word());
    foreach (nibble_hits[i]) begin
      checks++;
      if (nibble_hits[i] == 0) begin
        failures++;
        $display("FAIL decision position %0d never exercised", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
