// psd_lpf: the low-pass filter of the phase-sensitive detector, a three-stage
// multirate chain that reduces 2.78 Msps to 86.8 ksps (total decimation 32).
//
//   CIC, 4 sections, /8      2.78 Msps -> 347 ksps
//   scaler: drop the CIC gain 8**4 = 2**12 (rounded shift)
//   FIR order 3 (4 taps), /2  347 ksps -> 174 ksps   taps 1 3 3 1 (/8)
//   FIR order 210 (211 taps), /2  174 ksps -> 86.8 ksps
//       Blackman-windowed sinc, cutoff 600 Hz
//
// The DC gain of the chain is one, so a product s_c = x r_c turns into its
// DC term y_c. The group delay is 52.5 + 0.375 + 0.44 = 53.3 output samples
// (614 us). The response of the 211-tap stage is -2 dB at 600 Hz, -26 dB at
// 2 kHz and below -68 dB from 3 kHz on (below -110 dB at the 20-150 kHz
// mixer products). A 60 dB stop band already at 2 kHz would need roughly
// twice as many taps at this rate; 211 taps is the order kept here. The
// taps (18 bit) sum to 2**23, the largest one being 103640.
//
// The chain is shared by NCH channels (time-division multiplexed): inputs
// are tagged with their channel, ch_i, and a set of channels 0 .. NCH-1
// arrives in consecutive clocks; outputs leave the same way, tagged with
// ch_o. One multiplier per FIR stage serves all channels.
//
// Interface: x_i/ch_i with valid_i, one set per ADC sample (any rate that
// leaves NCH*FIR2_TAPS + 2 clocks per two FIR2 input sets); y_o/ch_o with
// valid_o, one set per 32 input sets.
//
// From the source design: the stage structure, decimation factors, FIR
// orders, cutoff, the rates and the time-multiplexed use of the filters. This design's own choices: CIC order (chosen
// to match the quoted group delay), tap values, word widths and rounding.
module psd_lpf
  import lid_pkg::*;
#(
  parameter int unsigned IW        = 31,
  parameter int unsigned NCH       = 4,
  parameter int unsigned CHW       = (NCH > 1) ? $clog2(NCH) : 1,
  parameter int unsigned OW        = DATA_W,
  parameter int unsigned CIC_N     = 4,
  parameter int unsigned CIC_R     = 8,
  parameter int unsigned FIR1_TAPS = 4,     // order 3
  parameter int unsigned FIR2_TAPS = 211,   // order 210
  parameter real         FS_IN_HZ  = real'(CLK_HZ) / real'(SAMPLE_DIV),
  parameter real         FC_HZ     = 600.0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 valid_i,
  input  logic [CHW-1:0]       ch_i,
  input  logic signed [IW-1:0] x_i,
  output logic                 valid_o,
  output logic [CHW-1:0]       ch_o,
  output logic signed [OW-1:0] y_o
);
  localparam int unsigned GROWTH = CIC_N * $clog2(CIC_R);
  localparam int unsigned CW     = IW + GROWTH;
  localparam real FS_FIR2 = FS_IN_HZ / real'(CIC_R) / 2.0;

  logic                 cic_v;
  logic [CHW-1:0]       cic_ch;
  logic signed [CW-1:0] cic_y;

  cic_decimator #(.IW(IW), .N(CIC_N), .R(CIC_R), .NCH(NCH), .OW(CW)) u_cic (
    .clk, .rst, .valid_i, .ch_i, .x_i,
    .valid_o(cic_v), .ch_o(cic_ch), .y_o(cic_y)
  );

  // Scaler: remove the CIC gain with a rounded arithmetic shift.
  logic signed [CW-1:0] cic_round;   // fits OW bits once the gain is removed
  logic signed [OW-1:0] cic_scaled;
  assign cic_round  = (cic_y + (CW'(1) <<< (GROWTH - 1))) >>> GROWTH;
  assign cic_scaled = OW'(cic_round);

  logic                 f1_v;
  logic [CHW-1:0]       f1_ch;
  logic signed [OW-1:0] f1_y;

  fir_decimator #(
    .IW(OW), .OW(OW), .TAPS(FIR1_TAPS), .DECIM(2),
    .KIND(FIR_BINOMIAL), .COEF_W(18), .COEF_FRAC(FIR1_TAPS - 1), .NCH(NCH)
  ) u_fir1 (
    .clk, .rst, .valid_i(cic_v), .ch_i(cic_ch), .x_i(cic_scaled),
    .valid_o(f1_v), .ch_o(f1_ch), .y_o(f1_y)
  );

  fir_decimator #(
    .IW(OW), .OW(OW), .TAPS(FIR2_TAPS), .DECIM(2),
    .KIND(FIR_SINC_BLACKMAN), .FC_OVER_FS(FC_HZ / FS_FIR2),
    .COEF_W(18), .COEF_FRAC(23), .NCH(NCH)
  ) u_fir2 (
    .clk, .rst, .valid_i(f1_v), .ch_i(f1_ch), .x_i(f1_y),
    .valid_o, .ch_o, .y_o
  );
endmodule
