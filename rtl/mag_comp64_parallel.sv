// mag_comp64_parallel: WIDTH-bit magnitude comparator, parallel architecture.
//
// All operand bits are applied at once to WIDTH/4 shut-down cells
// (mag_comp4), sixteen at the default WIDTH of 64, which all settle in
// parallel. Combining gates then pick the most significant nibble that
// differs, the same shut-down idea as inside a cell, one level up:
//   eq_k  = ~(gt_k | lt_k)                   nibble k equal
//   en_k  = AND of eq_j for all j > k        every nibble above k is equal
//           (en of the top nibble is 1)
//   A>B   = OR_k (en_k & gt_k),  A<B = OR_k (en_k & lt_k)
//   A=B   = ~(A>B | A<B)
// Every en_k has its own balanced AND tree and the two final ORs are
// balanced OR trees, so all nibbles are resolved at the same time: about
// log2(WIDTH/4) gate levels after the cells, at the cost of more gates
// than a ripple. The sixteen parallel cells followed by gates that form
// the final result are the published architecture; the combining netlist
// above is this design's own, as is the equality output derived from the
// other two. All gates are GDI gates.
//
// Interface: a, b (WIDTH bits, bit WIDTH-1 most significant) -> res
// {gt, eq, lt}, exactly one high. WIDTH must be a multiple of 4, at least 8.
// Timing: purely combinational.
module mag_comp64_parallel
  import mag_comp_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output cmp_result_t      res
);

  localparam int unsigned NCELL = WIDTH / 4;

  logic [NCELL-1:0] gt, lt;      // per-nibble results
  logic [NCELL-1:1] eqn;         // nibble equal (nibble 0 never enables another)
  logic [NCELL-2:0] en;          // all more significant nibbles equal
  logic [NCELL-1:0] sel_gt, sel_lt;

  for (genvar k = 0; k < NCELL; k++) begin : g_cell
    mag_comp4 u_cell (
      .a     (a[4*k +: 4]),
      .b     (b[4*k +: 4]),
      .a_gt_b(gt[k]),
      .a_lt_b(lt[k])
    );
    if (k > 0) begin : g_eq
      gdi_nor2 u_eq (.a(gt[k]), .b(lt[k]), .y(eqn[k]));
    end
  end

  // The top nibble is always enabled and selects its result directly.
  assign sel_gt[NCELL-1] = gt[NCELL-1];
  assign sel_lt[NCELL-1] = lt[NCELL-1];
  for (genvar k = 0; k < NCELL - 1; k++) begin : g_sel
    gdi_and_tree #(.N(NCELL - 1 - k)) u_en (.a(eqn[NCELL-1:k+1]), .y(en[k]));
    gdi_and2 u_sgt (.a(en[k]), .b(gt[k]), .y(sel_gt[k]));
    gdi_and2 u_slt (.a(en[k]), .b(lt[k]), .y(sel_lt[k]));
  end

  gdi_or_tree #(.N(NCELL)) u_or_gt (.a(sel_gt), .y(res.gt));
  gdi_or_tree #(.N(NCELL)) u_or_lt (.a(sel_lt), .y(res.lt));
  gdi_nor2 u_res_eq (.a(res.gt), .b(res.lt), .y(res.eq));

  initial assert (WIDTH % 4 == 0 && WIDTH >= 8)
    else $fatal(1, "mag_comp64_parallel: WIDTH must be a multiple of 4, at least 8");

endmodule
