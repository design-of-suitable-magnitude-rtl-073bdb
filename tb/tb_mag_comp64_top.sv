// tb_mag_comp64_top: end-to-end test of the three 64-bit comparator
// architectures side by side, at the top's default parameters.
//
// Operand pairs are built to first differ at every bit position 0..63 in
// both directions, plus equal pairs and fully random pairs. For each pair
// the serial, parallel and tree results are each checked against integer
// comparison, and exactly one flag of each must be high. The test counts
// the mechanisms the design relies on and fails if one never happened:
//   - a decision at every bit position (each shut-down depth inside a cell,
//     and each cell position along the serial cascade and the parallel
//     combining gates),
//   - a decision in each of the four second-stage groups of the tree,
//   - A>B, A<B and A=B outcomes,
//   - equality carried from the least significant cascade input all the
//     way to the output (operands equal).
module tb_mag_comp64_top
  import mag_comp_pkg::*;
  import tb_cmp_pkg::*;
;

  int checks = 0;
  int failures = 0;
  int bit_hits [W];
  int group_hits [4];
  int n_gt = 0, n_lt = 0, n_eq = 0;

  logic [W-1:0] a, b;
  cmp_result_t  res_serial, res_parallel, res_tree, exp;

  mag_comp64_top dut (
    .a(a), .b(b),
    .res_serial(res_serial), .res_parallel(res_parallel), .res_tree(res_tree)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(string arch, cmp_result_t got, cmp_result_t want,
                           logic [W-1:0] va, logic [W-1:0] vb);
    checks++;
    if (got !== want || !$onehot(got)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%h b=%h: got %b expected %b", arch, va, vb, got, want);
    end
  endtask

  task automatic apply(logic [W-1:0] va, logic [W-1:0] vb);
    int msd;
    a = va;
    b = vb;
    #1;
    exp = ref_cmp(va, vb);
    check_one("serial",   res_serial,   exp, va, vb);
    check_one("parallel", res_parallel, exp, va, vb);
    check_one("tree",     res_tree,     exp, va, vb);
    msd = -1;
    for (int i = 0; i < W; i++) if (va[i] != vb[i]) msd = i;
    if (msd >= 0) begin
      bit_hits[msd]++;
      group_hits[msd / 16]++;
    end
    if (exp.gt) n_gt++;
    if (exp.lt) n_lt++;
    if (exp.eq) n_eq++;
  endtask

  task automatic require(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    logic [W-1:0] va, vb;
    foreach (bit_hits[i]) bit_hits[i] = 0;
    foreach (group_hits[i]) group_hits[i] = 0;
    for (int k = 0; k < W; k++)
      for (int n = 0; n < 20; n++) begin
        make_pair(k, va, vb);
        if (n % 2 == 0) apply(va, vb); else apply(vb, va);
      end
    for (int n = 0; n < 100; n++) begin
      make_pair(-1, va, vb);
      apply(va, vb);
    end
    for (int n = 0; n < 1000; n++) apply(rand_word(), rand_word());

    foreach (bit_hits[i]) require($sformatf("decision at bit %0d", i), bit_hits[i]);
    foreach (group_hits[i]) require($sformatf("decision in tree group %0d", i), group_hits[i]);
    require("A>B", n_gt);
    require("A<B", n_lt);
    require("A=B (equality through whole cascade)", n_eq);
    $display("outcomes: gt=%0d lt=%0d eq=%0d; tree groups %0d/%0d/%0d/%0d",
             n_gt, n_lt, n_eq, group_hits[0], group_hits[1], group_hits[2], group_hits[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
