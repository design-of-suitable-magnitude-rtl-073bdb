// tb_mag_comp4: exhaustive check of the 4-bit shut-down comparator cell.
//
// All 256 operand pairs are applied; a_gt_b and a_lt_b are compared with
// the integer comparison of the two nibbles. The test also counts at which
// bit the decision was made (the most significant differing bit, worked
// out here by scanning the operands), so that every shut-down depth,
// including the all-equal case, is known to have been exercised.
module tb_mag_comp4;

  int checks = 0;
  int failures = 0;
  int decided_at [5];   // index 4: nibbles equal

  logic [3:0] a, b;
  logic gt, lt;
  mag_comp4 dut (.a(a), .b(b), .a_gt_b(gt), .a_lt_b(lt));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (decided_at[i]) decided_at[i] = 0;
    for (int i = 0; i < 256; i++) begin
      int msd;
      {a, b} = 8'(i);
      #1;
      msd = 4;
      for (int k = 0; k < 4; k++) if (a[k] != b[k]) msd = k;
      decided_at[msd]++;
      checks++;
      if (gt !== (a > b) || lt !== (a < b)) begin
        failures++;
        $display("FAIL a=%h b=%h: gt=%0b lt=%0b", a, b, gt, lt);
      end
    end
    foreach (decided_at[i]) begin
      checks++;
      if (decided_at[i] == 0) begin
        failures++;
        $display("FAIL decision depth %0d never exercised", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
