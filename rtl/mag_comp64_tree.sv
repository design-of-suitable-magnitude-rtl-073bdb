// mag_comp64_tree: WIDTH-bit magnitude comparator, tree architecture.
//
// A tree of shut-down cells (mag_comp4). The first stage compares the
// operands nibble by nibble (sixteen cells at the default WIDTH of 64).
// Each cell of the next stage takes four neighbouring results of the stage
// below: their A>B outputs form its A nibble and their A<B outputs its B
// nibble, the most significant result in bit 3. Because a cell never raises
// A>B and A<B together, the most significant bit where these two nibbles
// differ is exactly the most significant lower-stage cell that found a
// difference, so the next cell's verdict is the verdict of the wider
// operands. Stages continue until one cell remains (4 + 1 more cells at
// WIDTH = 64). Equality is derived after the last cell as ~(A>B | A<B).
// The 16-4-1 cell tree, with results of one stage given to the cells of
// the next, is the published architecture and the one it recommends as the
// fastest; the gt-as-A / lt-as-B wiring and the equality gate are this
// design's choices.
//
// Interface: a, b (WIDTH bits, bit WIDTH-1 most significant) -> res
// {gt, eq, lt}, exactly one high. WIDTH must be a power of 4, at least 4.
// Timing: purely combinational, log4(WIDTH) cell delays deep.
module mag_comp64_tree
  import mag_comp_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output cmp_result_t      res
);

  localparam int unsigned LEVELS = tree_levels(WIDTH);

  // Stage l (0 first) has WIDTH / 4**(l+1) cells; each stage keeps its cell
  // outputs in its own gt/lt vectors, read by the next stage.
  for (genvar l = 0; l < LEVELS; l++) begin : g_stage
    localparam int unsigned NC = WIDTH >> (2 * (l + 1));
    logic [NC-1:0] gt, lt;
    for (genvar c = 0; c < NC; c++) begin : g_cell
      logic [3:0] ca, cb;
      if (l == 0) begin : g_leaf
        assign ca = a[4*c +: 4];
        assign cb = b[4*c +: 4];
      end else begin : g_inner
        assign ca = g_stage[l-1].gt[4*c +: 4];
        assign cb = g_stage[l-1].lt[4*c +: 4];
      end
      mag_comp4 u_cell (.a(ca), .b(cb), .a_gt_b(gt[c]), .a_lt_b(lt[c]));
    end
  end

  assign res.gt = g_stage[LEVELS-1].gt[0];
  assign res.lt = g_stage[LEVELS-1].lt[0];
  gdi_nor2 u_res_eq (.a(res.gt), .b(res.lt), .y(res.eq));

  initial assert (WIDTH >= 4 && (4 ** LEVELS) == WIDTH)
    else $fatal(1, "mag_comp64_tree: WIDTH must be a power of 4");

endmodule
