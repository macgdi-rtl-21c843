// tb_macgdi_filter: end-to-end test of the MAC FIR filter at its default
// parameters (16 taps, 16-bit data, 16-bit Q15 coefficients).
//
// The reference model is the direct-form convolution over all 16 taps with
// the full symmetric impulse response, so it does not share the folding
// of the design. Stimulus: an impulse (the output must replay h[0..15]),
// a full-scale positive and negative step, a full-scale alternating
// sequence, and random samples with random gaps and offers made while the
// filter is busy. Every output is compared with the model and its latency
// (N/2+1 edges after the accepting edge) and the sample period are checked.
// Mechanisms that must each occur at least once are counted: sample taken,
// offer held off while busy, back-to-back sample at the first ready cycle,
// negative folded sum, negative coefficient, negative product, the most
// negative folded sum (-65536), the delay line dropping its oldest sample,
// accumulator clear.
module tb_macgdi_filter;
  import macgdi_pkg::*;
  localparam int N = 16, DW = 16, AW = 37;

  logic clk = 0, rst_n = 0;
  logic sample_valid, sample_ready, y_valid;
  logic signed [DW-1:0] sample_in;
  logic signed [AW-1:0] y_out;

  macgdi_filter dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int h [N];
  longint hist [N];
  longint expected [$];
  int take_cycle [$];
  int cycle = 0, last_take = -100;
  int n_taken = 0, n_held = 0, n_b2b = 0, n_negsum = 0, n_negcoef = 0;
  int n_negprod = 0, n_minsum = 0, n_drop = 0, n_clr = 0, n_out = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Designed coefficients h[0..7], mirrored.
  initial begin
    int half [8] = '{-90, 82, 427, -58, -1742, -995, 5569, 13190};
    for (int k = 0; k < N / 2; k++) begin
      h[k] = half[k];
      h[N-1-k] = half[k];
    end
  end

  always @(posedge clk) cycle <= cycle + 1;

  // Model update and accounting at every accepting edge.
  always @(posedge clk) if (rst_n) begin
    if (sample_valid && sample_ready) begin
      longint y;
      y = 0;
      if (n_taken >= N) n_drop++;
      for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = longint'(sample_in);
      for (int i = 0; i < N; i++) y += longint'(h[i]) * hist[i];
      expected.push_back(y);
      take_cycle.push_back(cycle);
      if (cycle - last_take == N / 2 + 2) n_b2b++;
      last_take = cycle;
      n_taken++;
    end
    if (sample_valid && !sample_ready) n_held++;
    if (dut.acc_clr) n_clr++;
    if (dut.mac_en) begin
      if (dut.u_mac.s_sign) n_negsum++;
      if (dut.u_mac.c_sign) n_negcoef++;
      if (dut.u_mac.p_sign && dut.u_mac.p_mag != 0) n_negprod++;
      if (dut.u_mac.pre_sum == 17'h10000) n_minsum++;
    end
  end

  // Output checking.
  always @(posedge clk) if (rst_n && y_valid) begin
    longint e;
    int tc;
    n_out++;
    checks++;
    if (expected.size() == 0) begin
      failures++;
      $display("FAIL output without a sample");
    end else begin
      e  = expected.pop_front();
      tc = take_cycle.pop_front();
      if (y_out !== AW'(e)) begin
        failures++;
        $display("FAIL output %0d: y=%0d exp=%0d", n_out, y_out, e);
      end
      checks++;
      // y_valid seen at this edge was set by the edge N/2+1 after taking.
      if (cycle - tc != N / 2 + 2) begin
        failures++;
        $display("FAIL latency %0d cycles", cycle - tc);
      end
    end
  end

  // Offer one sample, holding it until taken; optionally offer early.
  task automatic send(input logic signed [DW-1:0] v);
    @(negedge clk);
    sample_valid = 1;
    sample_in = v;
    do @(posedge clk); while (!sample_ready);
    @(negedge clk);
    sample_valid = 0;
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic check_count(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else $display("  %-32s %0d", what, n);
  endtask

  initial begin
    sample_valid = 0;
    sample_in = 0;
    foreach (hist[i]) hist[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++;
    if (!sample_ready || y_valid) begin failures++; $display("FAIL after reset"); end

    // Impulse: output replays h.
    send(16'sd1);
    repeat (N - 1) send(16'sd0);
    // Full-scale steps.
    repeat (N + 2) send(16'sd32767);
    repeat (N + 2) send(-16'sd32768);
    // Alternating full scale.
    for (int i = 0; i < N + 2; i++) send(i[0] ? 16'sd32767 : -16'sd32768);
    // Random samples, random gaps; valid held high across busy cycles.
    for (int i = 0; i < 400; i++) begin
      if ($urandom_range(0, 3) == 0) idle($urandom_range(1, 12));
      send(DW'($urandom));
    end
    idle(N);

    checks++;
    if (expected.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", expected.size());
    end
    $display("Mechanism counts:");
    check_count(n_taken,   "samples taken");
    check_count(n_out,     "outputs produced");
    check_count(n_held,    "offers held off while busy");
    check_count(n_b2b,     "back-to-back samples");
    check_count(n_clr,     "accumulator clears");
    check_count(n_negsum,  "negative folded sums");
    check_count(n_negcoef, "negative coefficients");
    check_count(n_negprod, "negative products");
    check_count(n_minsum,  "folded sum at -65536");
    check_count(n_drop,    "oldest sample dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
