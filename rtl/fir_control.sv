// fir_control: control unit of the MAC based FIR filter.
//
// A three-state machine produces one filter output per input sample:
//   IDLE  sample_ready = 1. When sample_valid is high the sample is taken:
//         shift_en shifts it into the data memory and acc_clr clears the
//         accumulator at the same edge. Next state MAC with tap = 0.
//   MAC   mac_en = 1 for N_TAPS/2 cycles while tap counts 0 .. N_TAPS/2-1;
//         the data path reads x[tap], x[N-1-tap] and h[tap].
//   OUT   out_load = 1 for one cycle: the output register takes the sum.
// So a sample accepted at edge 0 is in the output register after edge
// N_TAPS/2+1, and a new sample can be taken every N_TAPS/2+2 cycles.
// Samples offered while not ready are not taken (the source must hold them).
// A control unit is part of the original block diagram; this schedule and
// the valid/ready handshake are this design's choices.
module fir_control
  import macgdi_pkg::*;
#(
  parameter int unsigned N_TAPS = DEF_N_TAPS,
  localparam int unsigned TW    = $clog2(N_TAPS/2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sample_valid,
  output logic          sample_ready,
  output logic          shift_en,
  output logic          acc_clr,
  output logic          mac_en,
  output logic [TW-1:0] tap,
  output logic          out_load
);
  localparam logic [TW-1:0] LAST_TAP = TW'(N_TAPS/2 - 1);

  fir_state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      tap   <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (sample_valid) begin
          state <= ST_MAC;
          tap   <= '0;
        end
        ST_MAC: if (tap == LAST_TAP) begin
          state <= ST_OUT;
          tap   <= '0;
        end else begin
          tap <= tap + 1'b1;
        end
        ST_OUT:  state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    sample_ready = (state == ST_IDLE);
    shift_en     = sample_ready && sample_valid;
    acc_clr      = shift_en;
    mac_en       = (state == ST_MAC);
    out_load     = (state == ST_OUT);
  end

  initial begin
    assert (N_TAPS >= 4 && N_TAPS % 2 == 0)
      else $error("fir_control: N_TAPS must be even and at least 4");
  end
endmodule
