// gdi_twos_to_sm: two's complement to sign-magnitude conversion in GDI gates.
//
// sign is the top bit of x. The magnitude is x when sign = 0 and -x when
// sign = 1, formed as (x xor sign) + sign: every bit passes a GDI XOR with
// the sign, then a chain of GDI half adders adds the sign at bit 0. The
// magnitude keeps all W bits, so the most negative input -2^(W-1) gives the
// magnitude 2^(W-1) exactly. Combinational.
// The conversion step is part of the original MAC; this circuit for it is
// this design's choice.
module gdi_twos_to_sm
  import macgdi_pkg::*;
#(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0] x,
  output logic         sign,
  output logic [W-1:0] mag
);
  logic [W-1:0] inv;
  logic [W:0]   carry;

  assign sign     = x[W-1];
  assign carry[0] = sign;

  for (genvar i = 0; i < W; i++) begin : g_bit
    gdi_gate #(.FUNC(GDI_XOR)) u_x (.a(sign), .b(x[i]), .c(1'b0), .y(inv[i]));
    gdi_half_adder u_inc (.a(inv[i]), .b(carry[i]), .s(mag[i]), .c(carry[i+1]));
  end
endmodule
