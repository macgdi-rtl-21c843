// macgdi_filter: MAC based linear-phase FIR filter with a GDI-logic MAC unit.
//
// Top level of the filter: a data memory (delay line with two read ports),
// a coefficient ROM, the folded MAC unit, an output register and a control
// unit. For every input sample it computes
//   y = sum_{k=0}^{N/2-1} h[k] * (x[k] + x[N-1-k])
// which equals the direct-form sum over all N taps because h is symmetric;
// folding halves the number of multiplications. The MAC does one folded
// product per clock.
//
// Interface: valid/ready input. A sample is taken at a rising edge with
// sample_valid and sample_ready both high. The result for that sample is in
// y_out after the (N_TAPS/2+1)-th rising edge following the accepting edge,
// with y_valid high for that one cycle; y_out keeps its value until the next
// result. sample_ready returns in that same cycle, so a new sample can be
// taken every N_TAPS/2+2 cycles (10 cycles at the default 16 taps). y_out is the
// full-precision sum (ACC_W bits, with the Q15 default coefficients this is
// the Q15-scaled output). Reset (rst_n low, asynchronous) clears the data
// memory, accumulator and output.
// The five blocks and the folded structure follow the original design; the
// filter length, widths, coefficients, handshake and single-edge clocking
// are this design's choices.
module macgdi_filter
  import macgdi_pkg::*;
#(
  parameter int unsigned N_TAPS = DEF_N_TAPS,
  parameter int unsigned DATA_W = DEF_DATA_W,
  parameter int unsigned COEF_W = DEF_COEF_W,
  parameter logic [N_TAPS/2-1:0][COEF_W-1:0] COEFS = DEF_COEFS,
  localparam int unsigned ACC_W = acc_width(DATA_W, COEF_W, N_TAPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sample_valid,
  input  logic signed [DATA_W-1:0] sample_in,
  output logic                    sample_ready,
  output logic                    y_valid,
  output logic signed [ACC_W-1:0] y_out
);
  localparam int unsigned TW = $clog2(N_TAPS/2);
  localparam int unsigned AW = $clog2(N_TAPS);

  logic          shift_en, acc_clr, mac_en, out_load;
  logic [TW-1:0] tap;
  logic [AW-1:0] addr_a, addr_b;
  logic signed [DATA_W-1:0] x_a, x_b;
  logic signed [COEF_W-1:0] coef;
  logic signed [ACC_W-1:0]  acc;

  fir_control #(.N_TAPS(N_TAPS)) u_ctrl (
    .clk, .rst_n, .sample_valid, .sample_ready,
    .shift_en, .acc_clr, .mac_en, .tap, .out_load);

  // Folded addressing: x[k] pairs with x[N-1-k].
  assign addr_a = AW'(tap);
  assign addr_b = AW'(N_TAPS - 1) - AW'(tap);

  data_memory #(.N_TAPS(N_TAPS), .DATA_W(DATA_W)) u_dmem (
    .clk, .rst_n, .shift_en, .din(sample_in),
    .addr_a, .addr_b, .dout_a(x_a), .dout_b(x_b));

  coef_rom #(.N_TAPS(N_TAPS), .COEF_W(COEF_W), .COEFS(COEFS)) u_rom (
    .addr(tap), .coef(coef));

  mac_unit #(.DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n, .x_a, .x_b, .coef, .clr(acc_clr), .en(mac_en), .acc);

  output_register #(.W(ACC_W)) u_out (
    .clk, .rst_n, .load(out_load), .din(acc), .dout(y_out), .valid(y_valid));

  // Handshake rules.
  assert property (@(posedge clk) disable iff (!rst_n) y_valid |=> !y_valid);
  assert property (@(posedge clk) disable iff (!rst_n) y_valid |-> sample_ready);
endmodule
