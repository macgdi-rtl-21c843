// tb_gdi_cell: exhaustive check of the GDI cell, D = G ? N : P, plus the
// single-cell wirings of the GDI function table (inverter, F1, F2, AND,
// OR) and of the modified-GDI table (AND, OR, XOR, XNOR with B on G).
module tb_gdi_cell;
  logic g, p, n, d;
  int checks = 0, failures = 0;

  gdi_cell dut (.g, .p, .n, .d);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (d !== exp) begin
      failures++;
      $display("FAIL %s: g=%b p=%b n=%b d=%b exp=%b", what, g, p, n, d, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      {g, p, n} = 3'(v);
      #1 check(g ? n : p, "cell");
    end
    // Table rows with A on G.
    for (int v = 0; v < 4; v++) begin
      logic a, b;
      {a, b} = 2'(v);
      g = a; p = 1'b1; n = 1'b0; #1 check(~a, "inv");
      g = a; p = 1'b0; n = b;    #1 check(a & b, "and");
      g = a; p = b;    n = 1'b1; #1 check(a | b, "or");
      g = a; p = b;    n = 1'b0; #1 check(~a & b, "f1");
      g = a; p = 1'b1; n = b;    #1 check(~a | b, "f2");
      // Modified-GDI wirings with B on G.
      g = b; p = 1'b0; n = a;    #1 check(a & b, "mgdi and");
      g = b; p = a;    n = 1'b1; #1 check(a | b, "mgdi or");
      g = b; p = a;    n = ~a;   #1 check(a ^ b, "mgdi xor");
      g = b; p = ~a;   n = a;    #1 check(~(a ^ b), "mgdi xnor");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
