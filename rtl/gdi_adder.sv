// gdi_adder: W-bit ripple-carry adder/subtractor of GDI full adders.
//
// With sub = 0 it computes a + b; with sub = 1 it computes a - b as
// a + ~b + 1: each b bit passes a GDI XOR with sub and sub is the carry
// into bit 0. cout is the carry out of the top bit (for unsigned use; for
// two's complement callers size W so that no overflow can occur).
// Used as the folding pre-adder, the accumulator adder and the row adder of
// the array multiplier. Combinational; the delay grows linearly with W.
// An adder/subtractor at the accumulator is part of the original design;
// the ripple-carry structure is this design's choice.
module gdi_adder
  import macgdi_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0]   carry;
  logic [W-1:0] b_eff;

  assign carry[0] = sub;

  for (genvar i = 0; i < W; i++) begin : g_bit
    gdi_gate #(.FUNC(GDI_XOR)) u_binv (.a(sub), .b(b[i]), .c(1'b0), .y(b_eff[i]));
    gdi_full_adder u_fa (.a(a[i]), .b(b_eff[i]), .cin(carry[i]), .s(sum[i]), .cout(carry[i+1]));
  end

  assign cout = carry[W];
endmodule
