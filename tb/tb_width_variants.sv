// tb_width_variants: checks that the comparators stay correct when WIDTH
// is changed from its default of 64.
//
// The top (all three architectures) is instantiated at WIDTH = 16 (a
// two-stage tree) and WIDTH = 256 (a four-stage tree). For each width,
// operand pairs that first differ at every bit position, in both
// directions, plus equal pairs and random pairs, are compared against
// integer comparison. Combinational: 1 time unit per vector.
module tb_width_variants
  import mag_comp_pkg::*;
;

  int checks = 0;
  int failures = 0;

  logic [15:0]  a16, b16;
  logic [255:0] a256, b256;
  cmp_result_t  s16, p16, t16, s256, p256, t256;

  mag_comp64_top #(.WIDTH(16)) u_w16 (
    .a(a16), .b(b16), .res_serial(s16), .res_parallel(p16), .res_tree(t16));
  mag_comp64_top #(.WIDTH(256)) u_w256 (
    .a(a256), .b(b256), .res_serial(s256), .res_parallel(p256), .res_tree(t256));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [255:0] rand256();
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[32*i +: 32] = $urandom();
    return r;
  endfunction

  // Pair of WIDTH-bit values (in the low bits) first differing at bit k;
  // k < 0 gives equal values.
  task automatic make_pair(int width, int k, output logic [255:0] va, output logic [255:0] vb);
    logic [255:0] keep;
    keep = (width == 256) ? '1 : ((256'(1) << width) - 256'(1));
    va = rand256() & keep;
    vb = va;
    if (k >= 0) begin
      logic [255:0] low_mask;
      low_mask = (256'(1) << k) - 256'(1);
      vb[k] = ~va[k];
      vb = (vb & ~low_mask) | (rand256() & low_mask);
    end
  endtask

  task automatic check(string what, cmp_result_t got, logic [255:0] va, logic [255:0] vb);
    cmp_result_t want;
    want = '{gt: va > vb, eq: va == vb, lt: va < vb};
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h: got %b expected %b", what, va, vb, got, want);
    end
  endtask

  task automatic apply(int width, logic [255:0] va, logic [255:0] vb);
    if (width == 16) begin
      a16 = va[15:0];
      b16 = vb[15:0];
      #1;
      check("w16 serial", s16, va, vb);
      check("w16 parallel", p16, va, vb);
      check("w16 tree", t16, va, vb);
    end else begin
      a256 = va;
      b256 = vb;
      #1;
      check("w256 serial", s256, va, vb);
      check("w256 parallel", p256, va, vb);
      check("w256 tree", t256, va, vb);
    end
  endtask

  initial begin
    logic [255:0] va, vb;
    int width;
    a16 = '0; b16 = '0; a256 = '0; b256 = '0;
    for (int w = 0; w < 2; w++) begin
      width = (w == 0) ? 16 : 256;
      for (int k = -1; k < width; k++)
        for (int n = 0; n < 6; n++) begin
          make_pair(width, k, va, vb);
          if (n % 2 == 0) apply(width, va, vb); else apply(width, vb, va);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
