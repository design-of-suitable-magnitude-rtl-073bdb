// gdi_or2: 2-input OR from one GDI cell (N=1, P=B, G=A), y = a | b.
// Combinational.
module gdi_or2 (
  input  logic a,
  input  logic b,
  output logic y
);
  gdi_cell u_cell (.g(a), .p(b), .n(1'b1), .out(y));
endmodule
