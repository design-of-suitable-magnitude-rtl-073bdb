// gdi_cell: the Gate Diffusion Input (GDI) basic cell, at logic level.
//
// A GDI cell is one pMOS and one nMOS transistor sharing their gate input G.
// The pMOS source is the input P and the nMOS source the input N; the joined
// drains are Out. With G high the nMOS conducts and Out follows N; with G low
// the pMOS conducts and Out follows P, so the cell is a 2:1 multiplexer
// Out = G ? N : P. Tying N, P and G to constants or signals gives the gate
// set every comparator in this design is built from:
//   OR  : N=1, P=B, G=A  -> A+B
//   AND : N=B, P=0, G=A  -> AB
//   MUX : N=C, P=B, G=A  -> A'B + AC
//   NOT : N=0, P=1, G=A  -> A'
// The cell, its tie-offs and the four functions follow the published GDI
// technique. What is not modelled is analog: a real GDI AND or OR passes a
// weak level (a threshold drop) in some input cases; here every level is full.
// Purely combinational, no timing.
module gdi_cell (
  input  logic g,    // common gate
  input  logic p,    // pMOS diffusion input, passed when g = 0
  input  logic n,    // nMOS diffusion input, passed when g = 1
  output logic out
);

  always_comb out = g ? n : p;

endmodule
