// tb_mac_unit: the folded GDI MAC unit at its default widths (16-bit data,
// 16-bit coefficients, 37-bit accumulator) against an integer model of
// acc += coef * (x_a + x_b). Runs random accumulation sequences, extreme
// operands (-32768 pairs times -32768, the largest products of both signs),
// clear-over-enable priority and hold when en is low. Checks that the sum
// appears one cycle after the enable cycle.
module tb_mac_unit;
  import macgdi_pkg::*;
  localparam int DW = 16, CW = 16, AW = 37;

  logic clk = 0, rst_n = 0;
  logic signed [DW-1:0] x_a, x_b;
  logic signed [CW-1:0] coef;
  logic clr, en;
  logic signed [AW-1:0] acc;
  longint model;
  int checks = 0, failures = 0;

  mac_unit #(.DATA_W(DW), .COEF_W(CW), .ACC_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic signed [DW-1:0] a, input logic signed [DW-1:0] b,
                      input logic signed [CW-1:0] c, input logic tclr, input logic ten);
    x_a = a; x_b = b; coef = c; clr = tclr; en = ten;
    @(posedge clk);
    if (tclr)      model = 0;
    else if (ten)  model += longint'(c) * (longint'(a) + longint'(b));
    #1;
    checks++;
    if (acc !== AW'(model)) begin
      failures++;
      $display("FAIL a=%0d b=%0d c=%0d clr=%b en=%b acc=%0d exp=%0d", a, b, c, tclr, ten, acc, model);
    end
  endtask

  initial begin
    x_a = 0; x_b = 0; coef = 0; clr = 0; en = 0; model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (acc !== '0) begin failures++; $display("FAIL reset"); end
    // Extremes: 8 worst-case products of each sign.
    step(0, 0, 0, 1, 0);
    repeat (8) step(-16'sd32768, -16'sd32768, -16'sd32768, 0, 1);
    step(0, 0, 0, 1, 0);
    repeat (8) step(16'sd32767, 16'sd32767, -16'sd32768, 0, 1);
    step(-16'sd32768, -16'sd32768, 16'sd32767, 0, 1);
    // Zero sums with negative coefficient, opposite-sign pairs.
    step(16'sd100, -16'sd100, -16'sd5, 0, 1);
    step(-16'sd7, 16'sd3, 16'sd9, 0, 1);
    // Clear wins over enable; hold.
    step(16'sd5, 16'sd5, 16'sd5, 1, 1);
    step(16'sd5, 16'sd5, 16'sd5, 0, 0);
    // Random sequences of 8 products between clears.
    for (int n = 0; n < 500; n++) begin
      step(DW'($urandom), DW'($urandom), CW'($urandom), 1, 0);
      for (int k = 0; k < 8; k++)
        step(DW'($urandom), DW'($urandom), CW'($urandom), 0, 1'($urandom_range(0, 7) != 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
