// tb_gdi_half_adder: exhaustive check of the GDI half adder.
module tb_gdi_half_adder;
  logic a, b, s, c;
  int checks = 0, failures = 0;

  gdi_half_adder dut (.a, .b, .s, .c);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int sum;
      {a, b} = 2'(v);
      sum = int'(a) + int'(b);
      #1;
      checks++;
      if ({c, s} !== 2'(sum)) begin
        failures++;
        $display("FAIL a=%b b=%b -> c=%b s=%b", a, b, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
