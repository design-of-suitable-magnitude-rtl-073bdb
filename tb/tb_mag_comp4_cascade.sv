// tb_mag_comp4_cascade: exhaustive check of the 4-bit cascade cell.
//
// For each of the three legal cascade inputs (A>B, A=B or A<B from the
// less significant side) and all 256 operand pairs, the expected output is
// the nibble's own verdict when the nibbles differ and the cascade input
// when they are equal. Exactly one output flag must be high.
module tb_mag_comp4_cascade
  import mag_comp_pkg::*;
;

  int checks = 0;
  int failures = 0;

  logic [3:0]  a, b;
  cmp_result_t cin, cout, exp;
  mag_comp4_cascade dut (.a(a), .b(b), .cin(cin), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 3; c++) begin
      cin = (c == 0) ? cmp_result_t'(3'b100) : (c == 1) ? CASCADE_INIT : cmp_result_t'(3'b001);
      for (int i = 0; i < 256; i++) begin
        {a, b} = 8'(i);
        #1;
        if (a > b)      exp = '{gt: 1'b1, eq: 1'b0, lt: 1'b0};
        else if (a < b) exp = '{gt: 1'b0, eq: 1'b0, lt: 1'b1};
        else            exp = cin;
        checks++;
        if (cout !== exp) begin
          failures++;
          $display("FAIL cin=%b a=%h b=%h: got %b expected %b", cin, a, b, cout, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
