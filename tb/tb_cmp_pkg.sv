// tb_cmp_pkg: operand generation and the reference model shared by the
// 64-bit comparator testbenches.
//
// Uniformly random 64-bit operands almost always differ in the top bits,
// which would leave the deep comparisons untested. make_pair therefore
// builds a pair that first differs at a chosen bit k: identical above k,
// opposite at k, independent random values below. k = -1 gives equal
// operands. ref_cmp is the reference: plain integer comparison.
package tb_cmp_pkg;
  import mag_comp_pkg::*;

  localparam int W = 64;

  function automatic logic [W-1:0] rand_word();
    return {$urandom(), $urandom()};
  endfunction

  function automatic void make_pair(int k, output logic [W-1:0] a, output logic [W-1:0] b);
    logic [W-1:0] low_mask;
    a = rand_word();
    b = a;
    if (k >= 0) begin
      low_mask = (W'(1) << k) - W'(1);
      b[k] = ~a[k];
      b = (b & ~low_mask) | (rand_word() & low_mask);
    end
  endfunction

  function automatic cmp_result_t ref_cmp(logic [W-1:0] a, logic [W-1:0] b);
    cmp_result_t r;
    r.gt = (a > b);
    r.lt = (a < b);
    r.eq = (a == b);
    return r;
  endfunction

endpackage
