// tb_gdi_adder: the 16-bit GDI ripple adder/subtractor against integer
// arithmetic, on corner values and random operands, adding and subtracting.
module tb_gdi_adder;
  localparam int W = 16;
  logic [W-1:0] a, b, sum;
  logic sub, cout;
  int checks = 0, failures = 0;

  gdi_adder #(.W(W)) dut (.a, .b, .sub, .sum, .cout);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic ts);
    longint unsigned full;
    a = ta; b = tb_; sub = ts;
    #1;
    if (ts) full = longint'(ta) + longint'(~tb_ & 16'hFFFF) + 1;
    else    full = longint'(ta) + longint'(tb_);
    checks++;
    if ({cout, sum} !== 17'(full)) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%b -> cout=%b sum=%h exp=%h", ta, tb_, ts, cout, sum, 17'(full));
    end
  endtask

  initial begin
    logic [W-1:0] corners [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h5555};
    foreach (corners[i]) foreach (corners[j]) begin
      apply(corners[i], corners[j], 1'b0);
      apply(corners[i], corners[j], 1'b1);
    end
    for (int i = 0; i < 5000; i++)
      apply(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
