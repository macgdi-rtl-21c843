// tb_data_memory: the 16-deep sample delay line against a queue model.
// Random shifts and non-shift cycles; after each edge both read ports are
// checked at random addresses and at the folded pair (k, 15-k).
module tb_data_memory;
  localparam int N = 16, DW = 16;
  logic clk = 0, rst_n = 0;
  logic shift_en;
  logic [DW-1:0] din, dout_a, dout_b;
  logic [3:0] addr_a, addr_b;
  logic [DW-1:0] model [N];
  int checks = 0, failures = 0;

  data_memory #(.N_TAPS(N), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int t = 0; t < 4; t++) begin
      if (t == 0) begin addr_a = 4'($urandom); addr_b = 4'($urandom); end
      else begin addr_a = 4'($urandom); addr_b = 4'(N - 1) - addr_a; end
      #1;
      checks++;
      if (dout_a !== model[addr_a] || dout_b !== model[addr_b]) begin
        failures++;
        $display("FAIL a[%0d]=%h exp %h  b[%0d]=%h exp %h", addr_a, dout_a, model[addr_a],
                 addr_b, dout_b, model[addr_b]);
      end
    end
  endtask

  initial begin
    shift_en = 0; din = 0; addr_a = 0; addr_b = 0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check_reads();
    for (int n = 0; n < 2000; n++) begin
      shift_en = 1'($urandom);
      din = DW'($urandom);
      @(posedge clk);
      if (shift_en) begin
        for (int i = N - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = din;
      end
      #1 check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
