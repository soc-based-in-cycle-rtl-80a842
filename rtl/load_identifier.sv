// load_identifier: phase-sensitive detector of one induction-heating load.
//
// For every ADC sample set it forms the load voltage and current, multiplies
// both by the quadrature references of the switching frequency and low-pass
// filters the four products, giving the first-harmonic components
//   V = vc - j vs  (load voltage),  I = ic - j is  (load current)
// at 86.8 ksps, from which the load impedance follows as Z = V / I,
// R = (vc ic + vs is)/(ic^2 + is^2), X = (vc is - vs ic)/(ic^2 + is^2).
//
// Voltage mode (vmode_i):
//   VMODE_RL : v = v_o - v_c, the drop across the R-L load itself, eq. (3).
//   VMODE_RLC: v = v_o - mid-scale, the whole R-L-C tank; L then needs the
//              known resonant capacitor, eq. (4)-(5).
// The current is i = i_L - mid-scale. The mid-scale offset only removes most
// of the DC; the detector rejects the rest.
//
// Interface: unsigned 12-bit codes vo_i, vc_i, il_i with valid_i, and the
// 10-bit reference phase of the instant the sample was taken. Timing: the
// reference table adds one clock, the mixer one clock, the multiplexer four
// and the filter (psd_lpf) the rest; res_o, complete, appears with valid_o
// once per 32 samples. The four products share one filter chain through a
// time-division multiplexer (tdm_serializer), so a load uses six multipliers:
// four in the mixers and one in each FIR stage.
//
// From the source design: the PSD structure of two multipliers and a
// low-pass filter per signal, the use of v_L (or v_o) and i_L, and both
// impedance views, and time-multiplexing of the filters. This design's own
// choices: the mid-scale offset, forming v_o - v_c digitally, the channel
// order and the word widths.
module load_identifier
  import lid_pkg::*;
#(
  parameter int unsigned FIR2_TAPS = 211
) (
  input  logic                      clk,
  input  logic                      rst,
  input  vmode_e                    vmode_i,
  input  logic                      valid_i,
  input  logic [ADC_BITS-1:0]       vo_i,
  input  logic [ADC_BITS-1:0]       vc_i,
  input  logic [ADC_BITS-1:0]       il_i,
  input  logic [LUT_PHASE_BITS-1:0] phase_i,
  output logic                      valid_o,
  output psd_result_t               res_o
);
  localparam int unsigned XW = ADC_BITS + 1;
  localparam int unsigned PWD = XW + SINE_BITS;
  localparam logic signed [XW-1:0] MID = XW'(1 << (ADC_BITS - 1));

  // Signal forming, registered to line up with the reference table read.
  logic signed [XW-1:0] v_r, i_r;
  always_ff @(posedge clk) begin
    if (valid_i) begin
      v_r <= (vmode_i == VMODE_RL) ? $signed({1'b0, vo_i}) - $signed({1'b0, vc_i})
                                   : $signed({1'b0, vo_i}) - MID;
      i_r <= $signed({1'b0, il_i}) - MID;
    end
  end

  logic                        ref_v;
  logic signed [SINE_BITS-1:0] rc, rs;

  sine_ref_gen u_ref (
    .clk, .rst, .valid_i, .phase_i,
    .valid_o(ref_v), .rc_o(rc), .rs_o(rs)
  );

  logic                  mv_v, mi_v;
  logic signed [PWD-1:0] v_c, v_s, i_c, i_s;

  psd_mixer #(.XW(XW), .RW(SINE_BITS)) u_mix_v (
    .clk, .rst, .valid_i(ref_v), .x_i(v_r), .rc_i(rc), .rs_i(rs),
    .valid_o(mv_v), .sc_o(v_c), .ss_o(v_s)
  );
  psd_mixer #(.XW(XW), .RW(SINE_BITS)) u_mix_i (
    .clk, .rst, .valid_i(ref_v), .x_i(i_r), .rc_i(rc), .rs_i(rs),
    .valid_o(mi_v), .sc_o(i_c), .ss_o(i_s)
  );

  // Time-division multiplexing: the four products share one filter chain,
  // channel 0..3 = v*cos, v*sin, i*cos, i*sin.
  logic                  tdm_v;
  logic [1:0]            tdm_ch;
  logic [PWD-1:0]        tdm_x;
  logic [PWD-1:0]        prod [4];

  assign prod = '{v_c, v_s, i_c, i_s};

  tdm_serializer #(.W(PWD), .NCH(4)) u_tdm (
    .clk, .rst, .valid_i(mv_v), .x_i(prod),
    .valid_o(tdm_v), .ch_o(tdm_ch), .y_o(tdm_x)
  );

  logic                     lpf_v;
  logic [1:0]               lpf_ch;
  logic signed [DATA_W-1:0] lpf_y;

  psd_lpf #(.IW(PWD), .NCH(4), .FIR2_TAPS(FIR2_TAPS)) u_lpf (
    .clk, .rst, .valid_i(tdm_v), .ch_i(tdm_ch), .x_i($signed(tdm_x)),
    .valid_o(lpf_v), .ch_o(lpf_ch), .y_o(lpf_y)
  );

  // Demultiplex the filtered channels into one result.
  always_ff @(posedge clk) begin
    valid_o <= 1'b0;
    if (rst) begin
      res_o <= '0;
    end else if (lpf_v) begin
      unique case (lpf_ch)
        2'd0: res_o.vc <= lpf_y;
        2'd1: res_o.vs <= lpf_y;
        2'd2: res_o.ic <= lpf_y;
        2'd3: begin
          res_o.is <= lpf_y;
          valid_o  <= 1'b1;
        end
      endcase
    end
  end

  // Both mixers see the same reference stream.
  assert property (@(posedge clk) disable iff (rst) (mv_v == mi_v))
    else $error("load_identifier: mixers out of step");
endmodule
