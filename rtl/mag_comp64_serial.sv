// mag_comp64_serial: WIDTH-bit magnitude comparator, serial architecture.
//
// WIDTH/4 cascade cells (mag_comp4_cascade) are chained like 7485-style
// comparators: the least significant cell gets the cascade inputs
// A<B = 0, A>B = 0, A=B = 1 (CASCADE_INIT), the outputs of each cell drive
// the cascade inputs of the next more significant cell, and the result is
// the cascade output of the most significant cell. At the default WIDTH of
// 64 that is sixteen cells. The architecture, the cell count and the
// initial cascade values are the published ones.
//
// Interface: a, b (WIDTH bits, bit WIDTH-1 most significant) -> res
// {gt, eq, lt}, exactly one of them high. WIDTH must be a multiple of 4.
// Timing: purely combinational; the result ripples through all WIDTH bit
// stages, which makes this the slowest of the three architectures.
module mag_comp64_serial
  import mag_comp_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output cmp_result_t      res
);

  localparam int unsigned NCELL = WIDTH / 4;

  cmp_result_t c [NCELL+1];   // c[k] enters cell k (cell 0 least significant)

  assign c[0] = CASCADE_INIT;
  for (genvar k = 0; k < NCELL; k++) begin : g_cell
    mag_comp4_cascade u_cell (
      .a   (a[4*k +: 4]),
      .b   (b[4*k +: 4]),
      .cin (c[k]),
      .cout(c[k+1])
    );
  end
  assign res = c[NCELL];

  initial assert (WIDTH % 4 == 0 && WIDTH >= 4)
    else $fatal(1, "mag_comp64_serial: WIDTH must be a positive multiple of 4");

endmodule
