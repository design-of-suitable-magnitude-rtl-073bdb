// gdi_xor2: 2-input XOR, y = a ^ b. One GDI cell in its MUX tie-off
// (G=A, P=B, N=B') selects B when A=0 and B' when A=1; a second GDI cell
// makes B'. The GDI construction of XOR is this design's choice.
// Combinational.
module gdi_xor2 (
  input  logic a,
  input  logic b,
  output logic y
);
  logic b_n;
  gdi_inv  u_inv  (.a(b), .y(b_n));
  gdi_cell u_mux  (.g(a), .p(b), .n(b_n), .out(y));
endmodule
