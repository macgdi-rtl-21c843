// gdi_half_adder: one-bit half adder of GDI gates.
//
// Sum is a GDI XOR (a drives G, P = b, N = b'), carry a GDI AND
// (a drives G, P = 0, N = b). Combinational.
// Half adders from GDI gates are part of the original MAC slice.
module gdi_half_adder
  import macgdi_pkg::*;
(
  input  logic a,
  input  logic b,
  output logic s,   // a xor b
  output logic c    // a and b
);
  gdi_gate #(.FUNC(GDI_XOR)) u_xor (.a(a), .b(b), .c(1'b0), .y(s));
  gdi_gate #(.FUNC(GDI_AND)) u_and (.a(a), .b(b), .c(1'b0), .y(c));
endmodule
