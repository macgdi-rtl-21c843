// gdi_cell: logic-level model of one Gate Diffusion Input (GDI) cell.
//
// A GDI cell is one PMOS and one NMOS transistor sharing a gate input G.
// Unlike a CMOS inverter, the PMOS source is the diffusion input P and the
// NMOS source the diffusion input N (not VDD and GND). With G low the PMOS
// conducts and D follows P; with G high the NMOS conducts and D follows N:
//   D = G ? N : P
// Wiring P and N to constants, to a second input or to its complement gives
// every gate of the GDI function table (see gdi_gate). The modified GDI cell
// ties the PMOS bulk to VDD and the NMOS bulk to GND; it has the same logic
// function, so this one model serves both styles. Swing degradation, bulk
// effects and delay are electrical and not represented here.
// Purely combinational, no timing.
// The cell and its function follow the published GDI technique.
module gdi_cell (
  input  logic g,   // common gate
  input  logic p,   // PMOS diffusion input
  input  logic n,   // NMOS diffusion input
  output logic d    // output (shared drain)
);
  always_comb d = g ? n : p;
endmodule
