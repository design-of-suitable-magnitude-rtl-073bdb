// mag_comp4: 4-bit magnitude comparator cell with logic shut-down, the
// building block of the parallel and tree 64-bit comparators.
//
// The cell has three parts, all built from GDI gates:
//  * shut-down part: the most significant bit pair is compared first, and
//    a lower bit's comparison is enabled only while every higher bit pair
//    is equal. With x_i = a_i ^ b_i, the enables are en3 = 1,
//    en2 = ~x3, en1 = ~(x3 | x2), en0 = ~(x3 | x2 | x1). Once a decision
//    is made, the lower comparison gates see their enable low and stay
//    quiet, which is where the power saving comes from.
//  * comparator part: bit i decides when d_i = en_i & x_i; it then reports
//    A>B if a_i is the 1 (gt_i = d_i & a_i) and A<B otherwise
//    (lt_i = d_i & b_i).
//  * selection part: at most one d_i is high, so the cell outputs are the
//    OR of the gt_i and the OR of the lt_i.
// Equal nibbles give a_gt_b = a_lt_b = 0; the cell has no equality output.
// The three-part organisation, the MSB-first shut-down and the XOR/AND/NOR
// gate set are the published cell's; the exact gate netlist (enable
// equations, AND gating in place of pass switches, OR selection) is this
// design's reading of it.
//
// Interface: a, b (4 bits, bit 3 most significant) -> a_gt_b, a_lt_b.
// Timing: purely combinational.
module mag_comp4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic       a_gt_b,
  output logic       a_lt_b
);

  logic [3:0] x;     // bit pair differs
  logic [2:0] en;    // comparison of bit i enabled (all higher bits equal)
  logic [3:0] d;     // bit i is the deciding bit
  logic [3:0] gt, lt;
  logic       nor21, gt_lo, gt_hi, lt_lo, lt_hi;

  // ---- shut-down part
  for (genvar i = 0; i < 4; i++) begin : g_xor
    gdi_xor2 u_x (.a(a[i]), .b(b[i]), .y(x[i]));
  end

  // bit 3 is always compared (en3 = 1)
  gdi_inv  u_en2  (.a(x[3]),             .y(en[2]));
  gdi_nor2 u_en1  (.a(x[3]), .b(x[2]),   .y(en[1]));
  gdi_nor2 u_nor21(.a(x[2]), .b(x[1]),   .y(nor21));
  gdi_and2 u_en0  (.a(en[2]), .b(nor21), .y(en[0]));

  // ---- comparator part
  assign d[3] = x[3];
  for (genvar i = 0; i < 3; i++) begin : g_dec
    gdi_and2 u_d (.a(en[i]), .b(x[i]), .y(d[i]));
  end
  for (genvar i = 0; i < 4; i++) begin : g_cmp
    gdi_and2 u_gt (.a(d[i]), .b(a[i]), .y(gt[i]));
    gdi_and2 u_lt (.a(d[i]), .b(b[i]), .y(lt[i]));
  end

  // ---- selection part
  gdi_or2 u_gt_lo (.a(gt[0]), .b(gt[1]), .y(gt_lo));
  gdi_or2 u_gt_hi (.a(gt[2]), .b(gt[3]), .y(gt_hi));
  gdi_or2 u_gt    (.a(gt_lo), .b(gt_hi), .y(a_gt_b));
  gdi_or2 u_lt_lo (.a(lt[0]), .b(lt[1]), .y(lt_lo));
  gdi_or2 u_lt_hi (.a(lt[2]), .b(lt[3]), .y(lt_hi));
  gdi_or2 u_lt    (.a(lt_lo), .b(lt_hi), .y(a_lt_b));

  // A cell can never claim both orders at once.
  always_comb assert (!(a_gt_b && a_lt_b) || $isunknown({a, b}))
    else $error("mag_comp4: a_gt_b and a_lt_b both high");

endmodule
