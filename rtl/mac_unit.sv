// mac_unit: folded multiply-accumulate unit of the FIR filter, GDI logic.
//
// One call computes acc += h[k] * (x[k] + x[N-1-k]) for a symmetric
// (linear-phase) filter, so each coefficient is used once for two taps.
// The datapath, all combinational and built from GDI cells:
//   1. pre-adder: x_a + x_b in DATA_W+1 bits (two's complement);
//   2. the sum and the coefficient are turned into sign-magnitude;
//   3. the magnitudes are multiplied by an unsigned array multiplier and the
//      product sign is the GDI XOR of the two signs;
//   4. the product is turned back into two's complement, sign-extended to
//      ACC_W bits and added to the accumulator by a GDI ripple adder.
// The accumulator register is an ordinary rising-edge register:
// clr loads 0 (and wins over en), en loads acc + product. One product per
// clock cycle; acc shows the sum one cycle after the en cycle.
// ACC_W must be at least DATA_W+COEF_W+2 plus log2 of the number of products
// summed, so that the sum cannot overflow.
// Folding, the sign-magnitude multiply and the GDI gates follow the
// original design; the single-cycle schedule, the widths and converting the
// coefficient in hardware are this design's choices.
module mac_unit
  import macgdi_pkg::*;
#(
  parameter int unsigned DATA_W = DEF_DATA_W,
  parameter int unsigned COEF_W = DEF_COEF_W,
  parameter int unsigned ACC_W  = DEF_ACC_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] x_a,    // x[k]
  input  logic signed [DATA_W-1:0] x_b,    // x[N-1-k]
  input  logic signed [COEF_W-1:0] coef,   // h[k]
  input  logic                     clr,    // clear accumulator
  input  logic                     en,     // accumulate this cycle
  output logic signed [ACC_W-1:0]  acc
);
  localparam int unsigned SW = DATA_W + 1;   // pre-adder sum width
  localparam int unsigned PW = SW + COEF_W;  // product magnitude width

  // 1. Folding pre-adder.
  logic [SW-1:0] pre_sum;
  logic          pre_co;
  gdi_adder #(.W(SW)) u_pre (
    .a({x_a[DATA_W-1], x_a}), .b({x_b[DATA_W-1], x_b}), .sub(1'b0),
    .sum(pre_sum), .cout(pre_co));

  // 2. To sign-magnitude.
  logic          s_sign, c_sign;
  logic [SW-1:0] s_mag;
  logic [COEF_W-1:0] c_mag;
  gdi_twos_to_sm #(.W(SW))     u_sm_s (.x(pre_sum), .sign(s_sign), .mag(s_mag));
  gdi_twos_to_sm #(.W(COEF_W)) u_sm_c (.x(coef),    .sign(c_sign), .mag(c_mag));

  // 3. Magnitude multiply, product sign.
  logic [PW-1:0] p_mag;
  logic          p_sign;
  gdi_array_mult #(.AW(SW), .BW(COEF_W)) u_mul (.a(s_mag), .b(c_mag), .p(p_mag));
  gdi_gate #(.FUNC(GDI_XOR)) u_psign (.a(s_sign), .b(c_sign), .c(1'b0), .y(p_sign));

  // 4. Back to two's complement, accumulate.
  logic [PW:0]      prod;
  logic [ACC_W-1:0] prod_ext, acc_next;
  logic             acc_co;
  gdi_sm_to_twos #(.W(PW)) u_tc (.sign(p_sign), .mag(p_mag), .y(prod));
  assign prod_ext = {{(ACC_W-PW-1){prod[PW]}}, prod};
  gdi_adder #(.W(ACC_W)) u_acc_add (
    .a(acc), .b(prod_ext), .sub(1'b0), .sum(acc_next), .cout(acc_co));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= '0;
    else if (en)  acc <= acc_next;
  end

  initial begin
    assert (ACC_W >= PW + 1) else $error("mac_unit: ACC_W too small");
  end
endmodule
