// gdi_nor2: 2-input NOR, y = ~(a | b), as a GDI OR followed by a GDI
// inverter (this design's construction). Combinational.
module gdi_nor2 (
  input  logic a,
  input  logic b,
  output logic y
);
  logic o;
  gdi_or2 u_or  (.a(a), .b(b), .y(o));
  gdi_inv u_inv (.a(o), .y(y));
endmodule
