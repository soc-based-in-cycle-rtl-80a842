// dds_modulator: phase-accumulator (DDS) modulator of one half-bridge
// series-resonant inverter.
//
// A 25-bit accumulator advances by the frequency tuning word ftw_i on every
// 100 MHz clock, so the switching frequency is f_sw = ftw * 100 MHz / 2**25
// (about 2.98 Hz per LSB; 20 kHz is ftw 6711, 75 kHz is ftw 25166). The gates
// run at a fixed duty cycle of 0.5: the high-side switch conducts while the
// accumulator MSB is 0, the low-side switch while it is 1. The 10 MSBs of the
// accumulator are the phase that addresses the reference sine table, which
// keeps the PSD references synchronous with the inverter voltage.
//
// A new tuning word takes effect on the next clock without a phase jump.
// While enable_i is low the accumulator is held at zero and both gates are
// off. Gate outputs and phase are registered (outputs follow the accumulator
// with one clock of delay).
//
// From the source design: phase-accumulator modulator, 25-bit accumulator,
// 10 MSBs for the references, duty 0.5. This design's own choices: the
// enable/reset behaviour and the gate polarity. No dead time is inserted;
// it is left to the gate drivers.
module dds_modulator
  import lid_pkg::*;
#(
  parameter int unsigned AW = PHASE_BITS,      // accumulator width
  parameter int unsigned PW = LUT_PHASE_BITS   // phase MSBs brought out
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          enable_i,
  input  logic [AW-1:0] ftw_i,
  output logic [PW-1:0] phase_o,
  output logic          gate_hi_o,
  output logic          gate_lo_o
);
  logic [AW-1:0] acc;

  always_ff @(posedge clk) begin
    if (rst || !enable_i) begin
      acc       <= '0;
      gate_hi_o <= 1'b0;
      gate_lo_o <= 1'b0;
      phase_o   <= '0;
    end else begin
      acc       <= acc + ftw_i;
      gate_hi_o <= ~acc[AW-1];
      gate_lo_o <=  acc[AW-1];
      phase_o   <= acc[AW-1 -: PW];
    end
  end
endmodule
