// tb_coef_rom: the default coefficient ROM against the designed 16-tap Q15
// low-pass half-set, and a ROM with an overridden 8-tap set.
module tb_coef_rom;
  logic [2:0] addr;
  logic [15:0] coef;
  logic [1:0] addr4;
  logic [7:0] coef4;
  int checks = 0, failures = 0;
  // Expected h[0..7] of the default filter.
  int exp_h [8] = '{-90, 82, 427, -58, -1742, -995, 5569, 13190};

  coef_rom dut (.addr, .coef);
  coef_rom #(.N_TAPS(8), .COEF_W(8), .COEFS({8'sd4, -8'sd3, 8'sd2, -8'sd1})) dut4 (.addr(addr4), .coef(coef4));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum = 0;
    for (int k = 0; k < 8; k++) begin
      addr = 3'(k);
      #1;
      checks++;
      sum += 2 * int'($signed(coef));
      if ($signed(coef) !== 16'(exp_h[k])) begin
        failures++;
        $display("FAIL h[%0d]=%0d exp %0d", k, $signed(coef), exp_h[k]);
      end
    end
    // DC gain of the whole filter is 1.0 in Q15 (within rounding).
    checks++;
    if (sum < 32760 || sum > 32770) begin failures++; $display("FAIL dc gain %0d", sum); end
    for (int k = 0; k < 4; k++) begin
      int e4 [4] = '{-1, 2, -3, 4};
      addr4 = 2'(k);
      #1;
      checks++;
      if ($signed(coef4) !== 8'(e4[k])) begin
        failures++;
        $display("FAIL small h[%0d]=%0d exp %0d", k, $signed(coef4), e4[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
