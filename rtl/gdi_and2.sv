// gdi_and2: 2-input AND from one GDI cell (N=B, P=0, G=A), y = a & b.
// Combinational.
module gdi_and2 (
  input  logic a,
  input  logic b,
  output logic y
);
  gdi_cell u_cell (.g(a), .p(1'b0), .n(b), .out(y));
endmodule
