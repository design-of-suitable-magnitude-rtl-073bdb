// mag_comp4_cascade: 4-bit magnitude comparator cell with cascade inputs,
// the building block of the serial 64-bit comparator.
//
// Four one-bit stages (mag_cmp_bit_stage) are chained: the cell's cascade
// inputs Ia_gt_b / Ia_eq_b / Ia_lt_b (cin), which carry the result of the
// less significant cells, enter the bit-0 stage, each stage feeds the next
// more significant one, and the bit-3 stage drives the cell's outputs
// (cout). Each stage keeps the incoming result while its own bits are equal
// and replaces it with its own decision otherwise, so cout is the
// comparison of {this nibble, everything below}, with this nibble's most
// significant differing bit deciding. The AND/OR cascade and the chaining of
// the stages are the published cell's; ordering the chain from bit 0 to
// bit 3 is what makes the result correct and is this design's reading.
//
// Interface: a, b (4 bits, bit 3 most significant), cin -> cout, with
// cmp_result_t {gt, eq, lt}. Feed cin = CASCADE_INIT to compare a nibble on
// its own. Timing: purely combinational; the worst path ripples through all
// four stages.
module mag_comp4_cascade
  import mag_comp_pkg::*;
(
  input  logic [3:0]  a,
  input  logic [3:0]  b,
  input  cmp_result_t cin,
  output cmp_result_t cout
);

  cmp_result_t c [5];   // c[i] enters bit stage i

  assign c[0] = cin;
  for (genvar i = 0; i < 4; i++) begin : g_bit
    mag_cmp_bit_stage u_stage (.a(a[i]), .b(b[i]), .cin(c[i]), .cout(c[i+1]));
  end
  assign cout = c[4];

endmodule
