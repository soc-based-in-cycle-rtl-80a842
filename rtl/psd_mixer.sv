// psd_mixer: the two multipliers of a phase-sensitive detector.
//
// Each input sample x is multiplied by the in-phase reference r_c = cos and
// the quadrature reference r_s = sin of the same phase, giving s_c = x r_c
// and s_s = x r_s. When x holds a component at the reference frequency, both
// products contain a DC term proportional to its cosine and sine parts, which
// the low-pass filter that follows extracts.
//
// Interface: x_i, rc_i, rs_i qualified by valid_i; products are full width
// (XW + RW bits, exact). Timing: one register stage, so sc_o/ss_o/valid_o
// follow the inputs by one clock; a new sample may be accepted every clock.
//
// From the source design: multiplication of each signal by the quadrature
// references. This design's own choice: full-precision registered products.
module psd_mixer #(
  parameter int unsigned XW = 13,  // sample width, signed
  parameter int unsigned RW = 18   // reference width, signed
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    valid_i,
  input  logic signed [XW-1:0]    x_i,
  input  logic signed [RW-1:0]    rc_i,
  input  logic signed [RW-1:0]    rs_i,
  output logic                    valid_o,
  output logic signed [XW+RW-1:0] sc_o,
  output logic signed [XW+RW-1:0] ss_o
);
  always_ff @(posedge clk) begin
    if (rst) valid_o <= 1'b0;
    else     valid_o <= valid_i;
    if (valid_i) begin
      sc_o <= x_i * rc_i;
      ss_o <= x_i * rs_i;
    end
  end
endmodule
