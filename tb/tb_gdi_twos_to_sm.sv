// tb_gdi_twos_to_sm: exhaustive check of the 17-bit two's complement to
// sign-magnitude converter (every input value, including -2^16).
module tb_gdi_twos_to_sm;
  localparam int W = 17;
  logic [W-1:0] x, mag;
  logic sign;
  int checks = 0, failures = 0;

  gdi_twos_to_sm #(.W(W)) dut (.x, .sign, .mag);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(1 << (W-1)); v < (1 << (W-1)); v++) begin
      int emag;
      x = W'(v);
      emag = (v < 0) ? -v : v;
      #1;
      checks++;
      if (sign !== (v < 0) || mag !== W'(emag)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d -> sign=%b mag=%0d", v, sign, mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
