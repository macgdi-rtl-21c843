// tb_output_register: load captures, hold without load, one-cycle valid
// pulse after each load, reset clears.
module tb_output_register;
  localparam int W = 37;
  logic clk = 0, rst_n = 0, load, valid;
  logic [W-1:0] din, dout, held;
  int checks = 0, failures = 0;

  output_register #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; din = '0; held = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (dout !== '0 || valid !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      load = ($urandom_range(0, 3) == 0);
      din  = W'({$urandom, $urandom});
      @(posedge clk);
      if (load) held = din;
      #1;
      checks++;
      if (dout !== held || valid !== load) begin
        failures++;
        $display("FAIL load=%b dout=%h exp=%h valid=%b", load, dout, held, valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
