// gdi_or_tree: N-input OR as a balanced tree of 2-input GDI OR gates
// (ceil(log2 N) gate levels, N-1 gates). The tree recurses on two halves;
// N = 1 passes the input through. Combinational.
module gdi_or_tree #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  output logic         y
);

  if (N == 1) begin : g_one
    assign y = a[0];
  end else if (N == 2) begin : g_two
    gdi_or2 u_or (.a(a[0]), .b(a[1]), .y(y));
  end else begin : g_split
    localparam int unsigned H = N / 2;
    logic lo, hi;
    gdi_or_tree #(.N(H))     u_lo (.a(a[H-1:0]), .y(lo));
    gdi_or_tree #(.N(N - H)) u_hi (.a(a[N-1:H]), .y(hi));
    gdi_or2                  u_or (.a(lo), .b(hi), .y(y));
  end

endmodule
