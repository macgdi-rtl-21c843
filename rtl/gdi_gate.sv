// gdi_gate: one logic gate built from GDI cells.
//
// The parameter FUNC picks how the cell inputs are wired, following the GDI
// function table: input a always drives the common gate G, and P and N are
// tied to constants, to b, to c or to b'. Single-cell gates (two
// transistors): INV, F1 (a'b), F2 (a'+b), OR, AND, MUX (a ? c : b).
// XOR and XNOR need b', so they add a GDI inverter cell on b (four
// transistors). NAND and NOR, which GDI cannot do in one cell, are an AND or
// OR cell followed by an inverter cell (four transistors).
// Inputs a gate does not use are ignored. Purely combinational.
// The wirings follow the GDI function tables; building NAND/NOR as a gate
// plus an inverter cell matches their four-transistor cost.
module gdi_gate
  import macgdi_pkg::*;
#(
  parameter gdi_func_e FUNC = GDI_AND
) (
  input  logic a,   // drives G
  input  logic b,   // second input
  input  logic c,   // third input, MUX only (selected when a = 1)
  output logic y
);
  if (FUNC == GDI_XOR || FUNC == GDI_XNOR) begin : g_xor
    logic b_n;
    gdi_cell u_inv_b (.g(b), .p(1'b1), .n(1'b0), .d(b_n));
    if (FUNC == GDI_XOR) begin : g_x
      gdi_cell u_main (.g(a), .p(b), .n(b_n), .d(y));
    end else begin : g_xn
      gdi_cell u_main (.g(a), .p(b_n), .n(b), .d(y));
    end
  end else if (FUNC == GDI_NAND || FUNC == GDI_NOR) begin : g_inv_out
    logic d;
    if (FUNC == GDI_NAND) begin : g_and
      gdi_cell u_main (.g(a), .p(1'b0), .n(b), .d(d));
    end else begin : g_or
      gdi_cell u_main (.g(a), .p(b), .n(1'b1), .d(d));
    end
    gdi_cell u_inv (.g(d), .p(1'b1), .n(1'b0), .d(y));
  end else begin : g_single
    logic p, n;
    always_comb begin
      case (FUNC)
        GDI_F1:  begin p = b;    n = 1'b0; end
        GDI_F2:  begin p = 1'b1; n = b;    end
        GDI_OR:  begin p = b;    n = 1'b1; end
        GDI_AND: begin p = 1'b0; n = b;    end
        GDI_MUX: begin p = b;    n = c;    end
        default: begin p = 1'b1; n = 1'b0; end   // GDI_INV
      endcase
    end
    gdi_cell u_main (.g(a), .p(p), .n(n), .d(y));
  end
endmodule
