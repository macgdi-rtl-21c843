// tb_gdi_full_adder: exhaustive check of the GDI full adder.
module tb_gdi_full_adder;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  gdi_full_adder dut (.a, .b, .cin, .s, .cout);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int sum;
      {a, b, cin} = 3'(v);
      sum = int'(a) + int'(b) + int'(cin);
      #1;
      checks++;
      if ({cout, s} !== 2'(sum)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b -> cout=%b s=%b", a, b, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
