// gdi_array_mult: unsigned AW x BW array multiplier in GDI gates.
//
// Row j of partial products is a & b[j], one GDI AND per bit. Row 0 gives
// product bit 0; its upper AW-1 bits, zero-extended, form the running sum.
// Each further row is added to the running sum by an AW-bit GDI ripple
// adder; the adder's low bit is product bit j, and its carry out with the
// remaining sum bits becomes the next running sum. After the last row the
// running sum is the top AW product bits. Combinational; the critical path
// crosses BW-1 ripple adders.
// Multiplying sign-magnitude operands follows the original MAC; the array
// structure is this design's choice.
module gdi_array_mult
  import macgdi_pkg::*;
#(
  parameter int unsigned AW = 17,
  parameter int unsigned BW = 16
) (
  input  logic [AW-1:0]    a,
  input  logic [BW-1:0]    b,
  output logic [AW+BW-1:0] p
);
  logic [BW-1:0][AW-1:0] pp;    // partial product rows
  logic [BW-1:0][AW-1:0] run;   // running sum after row j (already shifted)

  for (genvar j = 0; j < BW; j++) begin : g_row
    for (genvar i = 0; i < AW; i++) begin : g_pp
      gdi_gate #(.FUNC(GDI_AND)) u_and (.a(b[j]), .b(a[i]), .c(1'b0), .y(pp[j][i]));
    end

    if (j == 0) begin : g_first
      assign p[0]   = pp[0][0];
      assign run[0] = {1'b0, pp[0][AW-1:1]};
    end else begin : g_add
      logic [AW-1:0] s;
      logic          co;
      gdi_adder #(.W(AW)) u_add (.a(run[j-1]), .b(pp[j]), .sub(1'b0), .sum(s), .cout(co));
      assign p[j]   = s[0];
      assign run[j] = {co, s[AW-1:1]};
    end
  end

  assign p[AW+BW-1:BW] = run[BW-1];
endmodule
