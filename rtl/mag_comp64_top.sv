// mag_comp64_top: the three WIDTH-bit magnitude comparator architectures
// side by side.
//
// The same operands a and b drive the serial (ripple of cascade cells),
// parallel (sixteen shut-down cells plus combining gates) and tree
// (16-4-1 shut-down cells) comparators, and each brings out its own
// {A>B, A=B, A<B} result. The three compute the same function and differ
// in delay, power and gate count; the tree is the recommended one. Keeping
// all three in one top, instead of choosing one, is this design's choice so
// that they can be exercised and compared together.
//
// Interface: a, b (WIDTH bits, bit WIDTH-1 most significant) ->
// res_serial, res_parallel, res_tree, each a cmp_result_t {gt, eq, lt}.
// WIDTH defaults to 64 and must be a power of 4 (the tree requires it).
// Timing: purely combinational, no clock or reset.
module mag_comp64_top
  import mag_comp_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output cmp_result_t      res_serial,
  output cmp_result_t      res_parallel,
  output cmp_result_t      res_tree
);

  mag_comp64_serial   #(.WIDTH(WIDTH)) u_serial   (.a(a), .b(b), .res(res_serial));
  mag_comp64_parallel #(.WIDTH(WIDTH)) u_parallel (.a(a), .b(b), .res(res_parallel));
  mag_comp64_tree     #(.WIDTH(WIDTH)) u_tree     (.a(a), .b(b), .res(res_tree));

endmodule
