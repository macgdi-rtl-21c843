// gdi_sm_to_twos: sign-magnitude to two's complement conversion in GDI gates.
//
// The W-bit magnitude is zero-extended to W+1 bits, every bit passes a GDI
// XOR with sign, and a GDI half-adder chain adds sign at bit 0, giving
// y = sign ? -mag : mag. A negative zero (sign = 1, mag = 0) gives 0.
// Combinational.
// The conversion step is part of the original MAC; this circuit for it is
// this design's choice.
module gdi_sm_to_twos
  import macgdi_pkg::*;
#(
  parameter int unsigned W = 33
) (
  input  logic         sign,
  input  logic [W-1:0] mag,
  output logic [W:0]   y
);
  logic [W:0]   ext, inv;
  logic [W+1:0] carry;

  assign ext      = {1'b0, mag};
  assign carry[0] = sign;

  for (genvar i = 0; i <= W; i++) begin : g_bit
    gdi_gate #(.FUNC(GDI_XOR)) u_x (.a(sign), .b(ext[i]), .c(1'b0), .y(inv[i]));
    gdi_half_adder u_inc (.a(inv[i]), .b(carry[i]), .s(y[i]), .c(carry[i+1]));
  end
endmodule
