// tb_gdi_cell: exhaustive check of the GDI basic cell and of the four
// gate tie-offs built on it.
//
// Drives all eight (g, p, n) combinations into a bare cell and expects
// out = g ? n : p. Then drives all input pairs into the GDI gates
// (AND, OR, NOT, XOR, NOR) and the cell in its MUX tie-off, comparing with
// the Boolean functions written out independently (A+B, AB, A'B+AC, A').
// Combinational, so each vector is given 1 time unit to settle.
module tb_gdi_cell;

  int checks = 0;
  int failures = 0;

  logic g, p, n, out;
  gdi_cell dut (.g(g), .p(p), .n(n), .out(out));

  logic a, b, c, y_and, y_or, y_inv, y_xor, y_nor, y_mux;
  gdi_and2 u_and (.a(a), .b(b), .y(y_and));
  gdi_or2  u_or  (.a(a), .b(b), .y(y_or));
  gdi_inv  u_inv (.a(a), .y(y_inv));
  gdi_xor2 u_xor (.a(a), .b(b), .y(y_xor));
  gdi_nor2 u_nor (.a(a), .b(b), .y(y_nor));
  gdi_cell u_mux (.g(a), .p(b), .n(c), .out(y_mux));   // Table I MUX row

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {g, p, n} = 3'(v);
      #1;
      // nMOS passes N when the gate is high, pMOS passes P when it is low
      check($sformatf("cell g=%0b p=%0b n=%0b", g, p, n), out, (g & n) | (~g & p));
    end
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check($sformatf("AND %0b%0b", a, b), y_and, a & b);
      check($sformatf("OR %0b%0b", a, b),  y_or,  a | b);
      check($sformatf("NOT %0b", a),       y_inv, ~a);
      check($sformatf("XOR %0b%0b", a, b), y_xor, a ^ b);
      check($sformatf("NOR %0b%0b", a, b), y_nor, ~(a | b));
      check($sformatf("MUX %0b%0b%0b", a, b, c), y_mux, (~a & b) | (a & c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
