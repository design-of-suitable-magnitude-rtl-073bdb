// gdi_inv: inverter from one GDI cell (N=0, P=1, G=A). Combinational.
module gdi_inv (
  input  logic a,
  output logic y
);
  gdi_cell u_cell (.g(a), .p(1'b1), .n(1'b0), .out(y));
endmodule
