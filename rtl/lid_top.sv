// lid_top: in-cycle load-identification core for two induction-heating
// loads, each driven by its own half-bridge series-resonant inverter.
//
// The core tracks the first-harmonic impedance of each load continuously,
// 86.8 thousand times per second, so that its variation within one period of
// the rectified-mains bus voltage becomes visible. Data path per load:
//
//   dds_modulator --phase--> (captured at each ADC sampling instant)
//        |                              |
//   gate_hi/lo to the inverter          v
//   adc_spi_ctrl --v_o, v_c, i_L--> load_identifier (PSD: mixers + shared LPF)
//                                         |
//                                  axis_result_stream --> AXI4-Stream to DMA
//
// The processor configures the core through axil_regs (AXI4-Lite): switching
// frequency words, enables and the voltage mode of each load. Software then
// computes R and L from each streamed frame, e.g.
//   R = (vc ic + vs is) / (ic^2 + is^2)
//   L = (vc is - vs ic) / (2 pi f_sw (ic^2 + is^2)),  f_sw = ftw * 100 MHz / 2**25.
//
// ADC channel map (one SDO line each, shared CS/SCK):
//   adc_sdo[3l+0] = v_o, adc_sdo[3l+1] = v_c, adc_sdo[3l+2] = i_L of load l.
//
// Timing: one ADC sample set every 36 clocks (2.78 Msps at 100 MHz), one
// result frame of 10 words every 1152 clocks (86.8 ksps); the filter delay is
// about 614 us. Reset (aresetn) is active low and synchronous.
//
// From the source design: two loads, the modulator/ADC-control/identification
// partition, AXI4-Lite and AXI4-Stream links, rates and sizes. This design's
// own choices: the channel map, register map and stream framing.
module lid_top
  import lid_pkg::*;
#(
  parameter int unsigned N_LOADS   = 2,
  parameter int unsigned FIR2_TAPS = 211,
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic                clk,
  input  logic                aresetn,
  // AXI4-Lite configuration slave
  input  logic [5:0]          s_axil_awaddr,
  input  logic                s_axil_awvalid,
  output logic                s_axil_awready,
  input  logic [31:0]         s_axil_wdata,
  input  logic [3:0]          s_axil_wstrb,
  input  logic                s_axil_wvalid,
  output logic                s_axil_wready,
  output logic [1:0]          s_axil_bresp,
  output logic                s_axil_bvalid,
  input  logic                s_axil_bready,
  input  logic [5:0]          s_axil_araddr,
  input  logic                s_axil_arvalid,
  output logic                s_axil_arready,
  output logic [31:0]         s_axil_rdata,
  output logic [1:0]          s_axil_rresp,
  output logic                s_axil_rvalid,
  input  logic                s_axil_rready,
  // ADC bank (SPI)
  output logic                adc_cs_n,
  output logic                adc_sck,
  input  logic [3*N_LOADS-1:0] adc_sdo,
  // Inverter gate commands
  output logic [N_LOADS-1:0]  gate_hi,
  output logic [N_LOADS-1:0]  gate_lo,
  // AXI4-Stream results to the DMA
  output logic [31:0]         m_axis_tdata,
  output logic                m_axis_tvalid,
  input  logic                m_axis_tready,
  output logic                m_axis_tlast,
  // Set when a result frame was dropped because the stream sink stalled
  output logic                stream_ovf
);
  logic rst;
  assign rst = ~aresetn;

  logic [N_LOADS-1:0]    mod_en;
  logic                  adc_en, stream_en;
  vmode_e                vmode [N_LOADS];
  logic [PHASE_BITS-1:0] ftw [N_LOADS];
  logic [31:0]           ovf_cnt;

  axil_regs #(.N_LOADS(N_LOADS)) u_regs (
    .clk, .rst,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .mod_en_o(mod_en), .adc_en_o(adc_en), .stream_en_o(stream_en),
    .vmode_o(vmode), .ftw_o(ftw), .ovf_cnt_i(ovf_cnt)
  );

  logic                sample, adc_v;
  logic [ADC_BITS-1:0] adc_data [3*N_LOADS];

  adc_spi_ctrl #(.N_CH(3 * N_LOADS)) u_adc (
    .clk, .rst, .enable_i(adc_en),
    .cs_n_o(adc_cs_n), .sck_o(adc_sck), .sdo_i(adc_sdo),
    .sample_o(sample), .valid_o(adc_v), .data_o(adc_data)
  );

  logic [N_LOADS-1:0] res_v;
  psd_result_t        res [N_LOADS];

  for (genvar l = 0; l < int'(N_LOADS); l++) begin : g_load
    logic [LUT_PHASE_BITS-1:0] phase, phase_at_sample;

    dds_modulator u_mod (
      .clk, .rst, .enable_i(mod_en[l]), .ftw_i(ftw[l]),
      .phase_o(phase), .gate_hi_o(gate_hi[l]), .gate_lo_o(gate_lo[l])
    );

    // Reference phase of the instant the converters sample.
    always_ff @(posedge clk) if (sample) phase_at_sample <= phase;

    load_identifier #(.FIR2_TAPS(FIR2_TAPS)) u_id (
      .clk, .rst, .vmode_i(vmode[l]), .valid_i(adc_v),
      .vo_i(adc_data[3*l+0]), .vc_i(adc_data[3*l+1]), .il_i(adc_data[3*l+2]),
      .phase_i(phase_at_sample),
      .valid_o(res_v[l]), .res_o(res[l])
    );
  end

  axis_result_stream #(.N_LOADS(N_LOADS), .DEPTH(FIFO_DEPTH)) u_stream (
    .clk, .rst, .enable_i(stream_en), .valid_i(res_v[0]),
    .res_i(res), .ftw_i(ftw),
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast,
    .ovf_o(stream_ovf), .ovf_cnt_o(ovf_cnt)
  );

  // All loads share the ADC strobe, so their results arrive together.
  assert property (@(posedge clk) disable iff (rst) (res_v == '0 || res_v == '1))
    else $error("lid_top: load results out of step");
endmodule
