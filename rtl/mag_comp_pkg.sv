// mag_comp_pkg: types and constants shared by the magnitude comparators.
//
// A comparison result is the three mutually exclusive flags A>B, A=B and
// A<B, bundled as cmp_result_t. The same bundle is the cascade input and
// cascade output of the serial cell. CASCADE_INIT is what the least
// significant serial cell is fed: "A<B" and "A>B" at 0, "A=B" at 1, so an
// all-equal chain reports equality.
package mag_comp_pkg;

  typedef struct packed {
    logic gt;  // A > B
    logic eq;  // A = B
    logic lt;  // A < B
  } cmp_result_t;

  localparam cmp_result_t CASCADE_INIT = '{gt: 1'b0, eq: 1'b1, lt: 1'b0};

  // Number of 4-to-1 reduction levels of a tree over `width` bits
  // (width a power of 4): 4 -> 1, 16 -> 2, 64 -> 3.
  function automatic int unsigned tree_levels(int unsigned width);
    int unsigned n = width;
    int unsigned l = 0;
    while (n > 1) begin
      n = n / 4;
      l++;
    end
    return l;
  endfunction

endpackage
