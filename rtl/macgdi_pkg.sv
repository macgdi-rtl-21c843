// macgdi_pkg: types and constants shared by the GDI-based MAC FIR filter.
//
// gdi_func_e names the gate functions that a single Gate Diffusion Input
// cell (or a cell plus one inverter cell) provides by wiring its three
// inputs: G (common gate), P (PMOS diffusion) and N (NMOS diffusion).
// fir_state_e is the state of the filter's control unit.
// DEF_COEFS holds the default coefficient half-set of the 16-tap filter.
// The coefficient values are this design's choice: a Hamming-windowed sinc
// low-pass, cutoff 0.22 of the sample rate, scaled so the taps sum to 1.0
// in Q15 (h[n] = round(32767 * w[n] * sinc / sum), w[n] = 0.54 - 0.46 cos(2 pi n / 15)).
package macgdi_pkg;

  typedef enum logic [3:0] {
    GDI_INV,   // P=1, N=0, G=A       -> A'
    GDI_F1,    // P=B, N=0, G=A       -> A'B
    GDI_F2,    // P=1, N=B, G=A       -> A'+B
    GDI_OR,    // P=B, N=1, G=A       -> A+B
    GDI_AND,   // P=0, N=B, G=A       -> AB
    GDI_MUX,   // P=B, N=C, G=A       -> A'B+AC
    GDI_XOR,   // P=B, N=B', G=A      -> A'B+AB'
    GDI_XNOR,  // P=B', N=B, G=A      -> A'B'+AB
    GDI_NAND,  // AND cell + inverter cell
    GDI_NOR    // OR cell + inverter cell
  } gdi_func_e;

  typedef enum logic [1:0] {
    ST_IDLE,   // waiting for a sample
    ST_MAC,    // one folded product per cycle
    ST_OUT     // load output register
  } fir_state_e;

  localparam int unsigned DEF_N_TAPS = 16;
  localparam int unsigned DEF_DATA_W = 16;
  localparam int unsigned DEF_COEF_W = 16;

  // Accumulator width: pre-add grows one bit, product of the magnitudes is
  // (DATA_W+1)+COEF_W bits, back-conversion adds a sign bit, and summing
  // N/2 products adds clog2(N/2) bits.
  function automatic int unsigned acc_width(int unsigned data_w, int unsigned coef_w,
                                            int unsigned n_taps);
    return data_w + coef_w + 2 + $clog2(n_taps / 2);
  endfunction

  localparam int unsigned DEF_ACC_W = acc_width(DEF_DATA_W, DEF_COEF_W, DEF_N_TAPS);

  // h[0] .. h[7]; h[15-k] = h[k]. Element [k] is h[k].
  localparam logic [7:0][15:0] DEF_COEFS = {
    16'sd13190,   // h[7]
    16'sd5569,    // h[6]
    -16'sd995,    // h[5]
    -16'sd1742,   // h[4]
    -16'sd58,     // h[3]
    16'sd427,     // h[2]
    16'sd82,      // h[1]
    -16'sd90      // h[0]
  };

endpackage
