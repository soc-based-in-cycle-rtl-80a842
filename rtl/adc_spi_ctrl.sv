// adc_spi_ctrl: SPI master for a bank of 12-bit serial ADCs (LTC2315-12
// type) that share chip select and serial clock and each drive their own data
// line.
//
// Every SAMPLE_DIV clocks (36 at 100 MHz, i.e. 2.78 Msps) chip select falls;
// that edge is the sampling instant and is reported on sample_o so that the
// caller can record the reference phase belonging to the sample. The
// converters then shift FRAME_BITS bits out, MSB first, changing SDO after
// each falling SCK edge: LEAD_BITS leading zeros, the ADC_BITS data bits and
// trailing zeros. SCK idles low and runs at clk / (2*SCK_HALF) (50 MHz by
// default). The master takes each bit in the clock in which it drives SCK
// low, i.e. just before the converter changes SDO. When the frame ends, chip
// select rises and all channel words are presented on data_o with a
// one-clock valid_o pulse.
//
// Timing with the defaults: sample_o at frame clock 0, valid_o 34 clocks
// later, next sample_o 36 clocks after the previous one.
//
// From the source design: 12-bit converters, SPI control, 2.78 Msps, 100 MHz
// clock. This design's own choices: SCK rate, frame length, leading-zero
// count and the shared-CS bank arrangement.
module adc_spi_ctrl
  import lid_pkg::*;
#(
  parameter int unsigned N_CH       = 6,
  parameter int unsigned DW         = ADC_BITS,
  parameter int unsigned SAMPLE_DIV_P = SAMPLE_DIV,
  parameter int unsigned SCK_HALF   = 1,
  parameter int unsigned FRAME_BITS = 16,
  parameter int unsigned LEAD_BITS  = 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                enable_i,
  output logic                cs_n_o,
  output logic                sck_o,
  input  logic [N_CH-1:0]     sdo_i,
  output logic                sample_o,
  output logic                valid_o,
  output logic [DW-1:0]       data_o [N_CH]
);
  localparam int unsigned CS_LOW = 2 * SCK_HALF * FRAME_BITS;  // clocks with CS low
  localparam int unsigned CW = $clog2(SAMPLE_DIV_P);

  if (SAMPLE_DIV_P < CS_LOW + 2) begin : g_bad_div
    $error("adc_spi_ctrl: SAMPLE_DIV_P too small for the SPI frame");
  end
  if (LEAD_BITS + DW > FRAME_BITS) begin : g_bad_frame
    $error("adc_spi_ctrl: frame too short for the data bits");
  end

  logic [CW-1:0]          cnt;       // position in the sample period
  logic [$clog2(SCK_HALF+1)-1:0] hcnt;  // clocks in the current SCK half period
  logic [$clog2(FRAME_BITS+1)-1:0] nbit; // bits taken so far
  logic [FRAME_BITS-1:0]  shreg [N_CH];
  logic                   active;

  always_ff @(posedge clk) begin
    sample_o <= 1'b0;
    valid_o  <= 1'b0;
    if (rst || !enable_i) begin
      cnt    <= '0;
      hcnt   <= '0;
      nbit   <= '0;
      cs_n_o <= 1'b1;
      sck_o  <= 1'b0;
      active <= 1'b0;
    end else begin
      cnt <= (cnt == CW'(SAMPLE_DIV_P - 1)) ? '0 : cnt + 1'b1;
      if (cnt == '0) begin
        cs_n_o   <= 1'b0;       // sampling instant, conversion starts
        sample_o <= 1'b1;
        active   <= 1'b1;
        hcnt     <= '0;
        nbit     <= '0;
      end else if (active) begin
        if (hcnt == $bits(hcnt)'(SCK_HALF - 1)) begin
          hcnt  <= '0;
          sck_o <= ~sck_o;
          if (sck_o) begin        // falling edge now: take the current bit
            for (int c = 0; c < int'(N_CH); c++)
              shreg[c] <= {shreg[c][FRAME_BITS-2:0], sdo_i[c]};
            nbit <= nbit + 1'b1;
            if (nbit == $bits(nbit)'(FRAME_BITS - 1)) begin
              active  <= 1'b0;
              cs_n_o  <= 1'b1;
              valid_o <= 1'b1;
            end
          end
        end else begin
          hcnt <= hcnt + 1'b1;
        end
      end
    end
  end

  // Data bits sit below the leading zeros in the received frame.
  always_comb begin
    for (int c = 0; c < int'(N_CH); c++)
      data_o[c] = shreg[c][FRAME_BITS-1-LEAD_BITS -: DW];
  end
endmodule
