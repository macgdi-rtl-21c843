// tb_gdi_sm_to_twos: 33-bit sign-magnitude to 34-bit two's complement,
// on corner magnitudes (0, 1, max) with both signs and random values.
module tb_gdi_sm_to_twos;
  localparam int W = 33;
  logic sign;
  logic [W-1:0] mag;
  logic [W:0] y;
  int checks = 0, failures = 0;

  gdi_sm_to_twos #(.W(W)) dut (.sign, .mag, .y);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic ts, input logic [W-1:0] tm);
    longint e;
    sign = ts; mag = tm;
    #1;
    e = ts ? -longint'(tm) : longint'(tm);
    checks++;
    if (y !== (W+1)'(e)) begin
      failures++;
      $display("FAIL sign=%b mag=%0d -> y=%h exp=%h", ts, tm, y, (W+1)'(e));
    end
  endtask

  initial begin
    for (int s = 0; s < 2; s++) begin
      apply(1'(s), '0);
      apply(1'(s), 1);
      apply(1'(s), '1);
      apply(1'(s), {1'b1, {(W-1){1'b0}}});
    end
    for (int i = 0; i < 5000; i++)
      apply(1'($urandom), W'({$urandom, $urandom}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
