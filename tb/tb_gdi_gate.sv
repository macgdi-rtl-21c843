// tb_gdi_gate: exhaustive check of every GDI gate configuration against
// its Boolean function.
module tb_gdi_gate;
  import macgdi_pkg::*;
  logic a, b, c;
  logic y_inv, y_f1, y_f2, y_or, y_and, y_mux, y_xor, y_xnor, y_nand, y_nor;
  int checks = 0, failures = 0;

  gdi_gate #(.FUNC(GDI_INV))  u_inv  (.a, .b, .c, .y(y_inv));
  gdi_gate #(.FUNC(GDI_F1))   u_f1   (.a, .b, .c, .y(y_f1));
  gdi_gate #(.FUNC(GDI_F2))   u_f2   (.a, .b, .c, .y(y_f2));
  gdi_gate #(.FUNC(GDI_OR))   u_or   (.a, .b, .c, .y(y_or));
  gdi_gate #(.FUNC(GDI_AND))  u_and  (.a, .b, .c, .y(y_and));
  gdi_gate #(.FUNC(GDI_MUX))  u_mux  (.a, .b, .c, .y(y_mux));
  gdi_gate #(.FUNC(GDI_XOR))  u_xor  (.a, .b, .c, .y(y_xor));
  gdi_gate #(.FUNC(GDI_XNOR)) u_xnor (.a, .b, .c, .y(y_xnor));
  gdi_gate #(.FUNC(GDI_NAND)) u_nand (.a, .b, .c, .y(y_nand));
  gdi_gate #(.FUNC(GDI_NOR))  u_nor  (.a, .b, .c, .y(y_nor));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%b b=%b c=%b got=%b exp=%b", what, a, b, c, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check(y_inv,  !a,             "INV");
      check(y_f1,   !a && b,        "F1");
      check(y_f2,   !a || b,        "F2");
      check(y_or,   a || b,         "OR");
      check(y_and,  a && b,         "AND");
      check(y_mux,  a ? c : b,      "MUX");
      check(y_xor,  a != b,         "XOR");
      check(y_xnor, a == b,         "XNOR");
      check(y_nand, !(a && b),      "NAND");
      check(y_nor,  !(a || b),      "NOR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
