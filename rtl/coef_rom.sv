// coef_rom: read-only coefficient memory of the folded FIR filter.
//
// A linear-phase filter has h[k] = h[N-1-k], so only the N_TAPS/2 distinct
// coefficients are stored. The contents come from the COEFS parameter
// (element k is h[k], two's complement); the default is the 16-tap Q15
// low-pass of macgdi_pkg. Asynchronous read: coef = h[addr].
// A fixed coefficient ROM follows the original design; the contents and
// the asynchronous read are this design's choice.
module coef_rom
  import macgdi_pkg::*;
#(
  parameter int unsigned N_TAPS = DEF_N_TAPS,
  parameter int unsigned COEF_W = DEF_COEF_W,
  parameter logic [N_TAPS/2-1:0][COEF_W-1:0] COEFS = DEF_COEFS,
  localparam int unsigned AW = $clog2(N_TAPS/2)
) (
  input  logic [AW-1:0]     addr,
  output logic [COEF_W-1:0] coef
);
  logic [COEF_W-1:0] rom [N_TAPS/2];

  for (genvar k = 0; k < N_TAPS/2; k++) begin : g_rom
    assign rom[k] = COEFS[k];
  end

  assign coef = (32'(addr) < N_TAPS/2) ? rom[addr] : '0;
endmodule
