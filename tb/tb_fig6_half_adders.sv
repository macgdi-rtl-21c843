// tb_fig6_half_adders: the input vector of the MAC slice demonstration.
//
// Three GDI half adders receive the operand pairs (A0,B0) = (1,0),
// (A1,B1) = (1,1) and (Q,QQ) = (0,1). The expected outputs are S0 = 1,
// C0 = 0 and Sout = 1, Cout = 0. For (1,1) a half adder gives S1 = 0,
// C1 = 1; that is what is checked here. Each pair is also swept through
// all four input values to confirm the three instances are independent.
module tb_fig6_half_adders;
  logic a0, b0, a1, b1, q, qq;
  logic s0, c0, s1, c1, sout, cout;
  int checks = 0, failures = 0;

  gdi_half_adder u_ha0 (.a(a0), .b(b0), .s(s0),   .c(c0));
  gdi_half_adder u_ha1 (.a(a1), .b(b1), .s(s1),   .c(c1));
  gdi_half_adder u_ha2 (.a(q),  .b(qq), .s(sout), .c(cout));

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
      $display("FAIL %s = %b, expected %b", what, got, exp);
    end
  endtask

  initial begin
    // All inputs low first.
    {a0, b0, a1, b1, q, qq} = '0;
    #1;
    check(s0, 0, "S0"); check(c0, 0, "C0");
    check(s1, 0, "S1"); check(c1, 0, "C1");
    check(sout, 0, "Sout"); check(cout, 0, "Cout");
    // The demonstration vector.
    a0 = 1; b0 = 0; a1 = 1; b1 = 1; q = 0; qq = 1;
    #1;
    check(s0, 1, "S0");     check(c0, 0, "C0");
    check(s1, 0, "S1");     check(c1, 1, "C1");
    check(sout, 1, "Sout"); check(cout, 0, "Cout");
    // Independence: sweep one pair while the others are held.
    for (int v = 0; v < 4; v++) begin
      {a1, b1} = 2'(v);
      #1;
      check(s1, a1 ^ b1, "S1 sweep"); check(c1, a1 & b1, "C1 sweep");
      check(s0, 1, "S0 held");        check(sout, 1, "Sout held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
