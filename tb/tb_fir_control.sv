// tb_fir_control: the control unit for 16 taps. For each sample it checks
// the schedule cycle by cycle: take (shift_en = acc_clr = 1 while ready),
// then 8 MAC cycles with tap = 0..7, then one output-load cycle, and that
// nothing is taken while busy. Total N/2+2 = 10 cycles per output.
module tb_fir_control;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic sample_valid, sample_ready, shift_en, acc_clr, mac_en, out_load;
  logic [2:0] tap;
  int checks = 0, failures = 0;

  fir_control #(.N_TAPS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_sig(input logic r, input logic sh, input logic m, input int t,
                            input logic ol, input string what);
    checks++;
    if (sample_ready !== r || shift_en !== sh || acc_clr !== sh || mac_en !== m ||
        (m && tap !== 3'(t)) || out_load !== ol) begin
      failures++;
      $display("FAIL %s: ready=%b shift=%b clr=%b mac=%b tap=%0d load=%b", what,
               sample_ready, shift_en, acc_clr, mac_en, tap, out_load);
    end
  endtask

  initial begin
    sample_valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_sig(1, 0, 0, 0, 0, "idle");
    for (int s = 0; s < 200; s++) begin
      int gap = $urandom_range(0, 3);
      repeat (gap) begin
        @(negedge clk);
        expect_sig(1, 0, 0, 0, 0, "idle gap");
      end
      sample_valid = 1;
      #1 expect_sig(1, 1, 0, 0, 0, "take");
      for (int k = 0; k < N / 2; k++) begin
        @(negedge clk);
        sample_valid = 1'($urandom);   // offered while busy: must be ignored
        #1 expect_sig(0, 0, 1, k, 0, "mac");
      end
      @(negedge clk);
      sample_valid = 1'($urandom);
      #1 expect_sig(0, 0, 0, 0, 1, "out");
      @(negedge clk);
      sample_valid = 0;
      #1 expect_sig(1, 0, 0, 0, 0, "back idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
