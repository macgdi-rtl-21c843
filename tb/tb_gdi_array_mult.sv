// tb_gdi_array_mult: 17 x 16 unsigned GDI array multiplier against integer
// multiplication, corners (0, 1, all ones, top bit only) and random values.
module tb_gdi_array_mult;
  localparam int AW = 17, BW = 16;
  logic [AW-1:0] a;
  logic [BW-1:0] b;
  logic [AW+BW-1:0] p;
  int checks = 0, failures = 0;

  gdi_array_mult #(.AW(AW), .BW(BW)) dut (.a, .b, .p);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [AW-1:0] ta, input logic [BW-1:0] tb_);
    longint unsigned e;
    a = ta; b = tb_;
    #1;
    e = longint'(ta) * longint'(tb_);
    checks++;
    if (p !== (AW+BW)'(e)) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d exp %0d", ta, tb_, p, e);
    end
  endtask

  initial begin
    logic [AW-1:0] ca [5] = '{17'h0, 17'h1, 17'h1FFFF, 17'h10000, 17'h0AAAA};
    logic [BW-1:0] cb [5] = '{16'h0, 16'h1, 16'hFFFF, 16'h8000, 16'h5555};
    foreach (ca[i]) foreach (cb[j]) apply(ca[i], cb[j]);
    for (int i = 0; i < 5000; i++) apply(AW'($urandom), BW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
