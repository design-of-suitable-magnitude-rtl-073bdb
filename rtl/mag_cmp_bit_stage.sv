// mag_cmp_bit_stage: one bit position of the serial (cascade) comparator cell.
//
// The stage compares its own bit pair into gt = a & ~b, lt = ~a & b and
// eq = ~(gt | lt). Three AND gates pass the cascade inputs, which carry the
// result of the less significant bits, only when this bit pair is equal, and
// two OR gates let this bit's own gt/lt override them:
//   cout.eq = cin.eq & eq
//   cout.gt = (cin.gt & eq) | gt
//   cout.lt = (cin.lt & eq) | lt
// This AND/OR cascade is the published one; building the bit compare from
// two ANDs and a NOR follows the published gate list. All gates are GDI.
// Timing: purely combinational.
module mag_cmp_bit_stage
  import mag_comp_pkg::*;
(
  input  logic        a,
  input  logic        b,
  input  cmp_result_t cin,
  output cmp_result_t cout
);

  logic a_n, b_n, gt, lt, eq, pass_gt, pass_lt;

  gdi_inv  u_an (.a(a), .y(a_n));
  gdi_inv  u_bn (.a(b), .y(b_n));
  gdi_and2 u_gt (.a(a),   .b(b_n), .y(gt));
  gdi_and2 u_lt (.a(a_n), .b(b),   .y(lt));
  gdi_nor2 u_eq (.a(gt),  .b(lt),  .y(eq));

  gdi_and2 u_pass_eq (.a(cin.eq), .b(eq), .y(cout.eq));
  gdi_and2 u_pass_gt (.a(cin.gt), .b(eq), .y(pass_gt));
  gdi_and2 u_pass_lt (.a(cin.lt), .b(eq), .y(pass_lt));
  gdi_or2  u_or_gt   (.a(pass_gt), .b(gt), .y(cout.gt));
  gdi_or2  u_or_lt   (.a(pass_lt), .b(lt), .y(cout.lt));

endmodule
