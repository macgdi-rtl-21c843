// gdi_full_adder: one-bit full adder of two GDI half adders and a GDI OR.
//
// The first half adder adds a and b, the second adds that sum and cin; the
// two carries cannot both be 1, so a GDI OR merges them. Combinational.
// The two-half-adders-plus-OR structure is this design's choice.
module gdi_full_adder
  import macgdi_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic s1, c1, c2;
  gdi_half_adder u_ha0 (.a(a),  .b(b),   .s(s1), .c(c1));
  gdi_half_adder u_ha1 (.a(s1), .b(cin), .s(s),  .c(c2));
  gdi_gate #(.FUNC(GDI_OR)) u_or (.a(c1), .b(c2), .c(1'b0), .y(cout));
endmodule
