// sine_ref_gen: quadrature reference sinusoids for the phase-sensitive
// detector, r_c = cos(theta) and r_s = sin(theta).
//
// theta is the 10-bit phase taken from the MSBs of the modulator's phase
// accumulator, so the references are locked to the inverter switching. Only a
// quarter of a sine period is stored: 256 words of 18 bits in a ROM (a block
// RAM on an FPGA). The two top phase bits select the quadrant; the table is
// read forwards or backwards and the result negated as needed. The table
// holds the sine at the centre of each phase step, sin(pi/2 (k+0.5)/256), so
// the folding is exact and no entry is needed for 0 or 90 degrees. The cosine
// is the sine read a quarter period (256 steps) ahead, through a second read
// port of the same table.
//
// Timing: phase_i and valid_i are registered together with the table read;
// rc_o, rs_o and valid_o appear one clock after the inputs.
//
// From the source design: 10-bit phase, 256 x 18-bit quarter-wave table in a
// block RAM. This design's own choices: centre-of-step sampling, amplitude
// 2**17 - 1, one-clock latency.
module sine_ref_gen
  import lid_pkg::*;
#(
  parameter int unsigned PW = LUT_PHASE_BITS,  // phase bits (2 quadrant + table address)
  parameter int unsigned SW = SINE_BITS        // sine word width, signed
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 valid_i,
  input  logic [PW-1:0]        phase_i,
  output logic                 valid_o,
  output logic signed [SW-1:0] rc_o,
  output logic signed [SW-1:0] rs_o
);
  localparam int unsigned AW = PW - 2;
  localparam int unsigned DEPTH = 1 << AW;

  typedef logic [SW-2:0] mag_t;   // table magnitudes are non-negative
  typedef mag_t table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int k = 0; k < int'(DEPTH); k++) t[k] = mag_t'(sine_quarter(k, AW, SW));
    return t;
  endfunction

  localparam table_t QTAB = build_table();

  // Quadrant folding of one phase value: table address and sign.
  function automatic logic [AW:0] fold(input logic [PW-1:0] p);
    logic [1:0]    q   = p[PW-1 -: 2];
    logic [AW-1:0] idx = p[AW-1:0];
    logic [AW-1:0] addr = q[0] ? ~idx : idx;   // ~idx = DEPTH-1-idx
    return {q[1], addr};                        // {negate, address}
  endfunction

  logic [AW:0] fs, fc;
  assign fs = fold(phase_i);
  assign fc = fold(phase_i + PW'(DEPTH));      // cos = sin(theta + 90 deg)

  mag_t mag_s, mag_c;
  logic neg_s, neg_c;

  always_ff @(posedge clk) begin
    mag_s <= QTAB[fs[AW-1:0]];
    mag_c <= QTAB[fc[AW-1:0]];
    neg_s <= fs[AW];
    neg_c <= fc[AW];
    if (rst) valid_o <= 1'b0;
    else     valid_o <= valid_i;
  end

  always_comb begin
    rs_o = neg_s ? -$signed({1'b0, mag_s}) : $signed({1'b0, mag_s});
    rc_o = neg_c ? -$signed({1'b0, mag_c}) : $signed({1'b0, mag_c});
  end
endmodule
