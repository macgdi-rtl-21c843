// data_memory: sample delay line of the FIR filter with two read ports.
//
// Holds the last N_TAPS input samples, x[0] the newest. When shift_en is
// high at a rising clock edge every sample moves one place older, the
// oldest is dropped and din becomes x[0]. Two independent asynchronous read
// ports return x[addr_a] and x[addr_b] in the same cycle, which is what the
// folded structure needs to pair x[k] with x[N-1-k]. Reset clears all
// samples to zero. Addresses at or above N_TAPS read zero.
// A shifting sample store read at two addresses at once follows the
// original design; the asynchronous reads and reset are this design's choice.
module data_memory #(
  parameter int unsigned N_TAPS = 16,
  parameter int unsigned DATA_W = 16,
  localparam int unsigned AW    = $clog2(N_TAPS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              shift_en,
  input  logic [DATA_W-1:0] din,
  input  logic [AW-1:0]     addr_a,
  input  logic [AW-1:0]     addr_b,
  output logic [DATA_W-1:0] dout_a,
  output logic [DATA_W-1:0] dout_b
);
  logic [DATA_W-1:0] mem [N_TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_TAPS; i++) mem[i] <= '0;
    end else if (shift_en) begin
      mem[0] <= din;
      for (int i = 1; i < N_TAPS; i++) mem[i] <= mem[i-1];
    end
  end

  always_comb begin
    dout_a = (32'(addr_a) < N_TAPS) ? mem[addr_a] : '0;
    dout_b = (32'(addr_b) < N_TAPS) ? mem[addr_b] : '0;
  end
endmodule
