// fir_decimator: time-multiplexed decimate-by-DECIM FIR filter with one
// shared multiply-accumulate unit.
//
// NCH channels share one multiplier. Samples arrive one per clock tagged
// with their channel (ch_i), channels 0 .. NCH-1 forming one input set. Each
// channel has a circular buffer of TAPS + DECIM - 1 words; the extra words
// let new sets be written while the MAC still reads the previous window.
// After every DECIM-th set the filter computes one output per channel,
// y = sum_k h[k] x[n-k], walking each channel's buffer from the newest sample
// to the oldest, one tap per clock, channel after channel. The taps h[k] are
// built at elaboration time by lid_pkg::fir_coef (KIND selects a binomial or
// a Blackman-windowed sinc with cutoff FC_OVER_FS) and scaled to sum to
// 2**COEF_FRAC, so the DC gain is one after the final rounding shift. Each
// result is rounded (half up), shifted right by COEF_FRAC and saturated to
// OW bits.
//
// Timing: counting from the clock edge that takes the last input of the
// DECIM-th set, channel c's result appears with valid_o and ch_o = c
// (c+1)*TAPS + 1 clocks later. The MAC must finish, NCH*TAPS + 2 clocks,
// before the next DECIM-th set completes (checked by an assertion); at the
// system rates the 4-channel, 211-tap stage needs 846 of its 1152 clocks.
//
// From the source design: two FIR stages, each decimating by 2, of order 3
// and 210, with channels time-multiplexed. This design's own choices: the
// tap sets, the coefficient width and the serial (one multiplier) structure.
module fir_decimator
  import lid_pkg::*;
#(
  parameter int unsigned IW        = 32,
  parameter int unsigned OW        = 32,
  parameter int unsigned TAPS      = 4,
  parameter int unsigned DECIM     = 2,
  parameter fir_kind_e   KIND      = FIR_BINOMIAL,
  parameter real         FC_OVER_FS = 0.25,
  parameter int unsigned COEF_W    = 18,
  parameter int unsigned COEF_FRAC = 3,
  parameter int unsigned NCH       = 4,
  parameter int unsigned CHW       = (NCH > 1) ? $clog2(NCH) : 1
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
  localparam int unsigned DEPTH = TAPS + DECIM - 1;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned KW    = (TAPS > 1) ? $clog2(TAPS) : 1;
  localparam int unsigned ACW   = IW + COEF_W + KW + 1;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t coef_tab_t [TAPS];
  typedef logic signed [ACW-1:0] acc_t;

  function automatic coef_tab_t build_coefs();
    coef_tab_t t;
    for (int k = 0; k < int'(TAPS); k++)
      t[k] = coef_t'(fir_coef(KIND, int'(TAPS), k, FC_OVER_FS, int'(COEF_FRAC)));
    return t;
  endfunction

  localparam coef_tab_t H = build_coefs();

  logic signed [IW-1:0] xbuf [NCH][DEPTH];
  logic [AW-1:0]  wp;          // slot written by the current input set
  logic [AW-1:0]  start;       // newest slot of the window being filtered
  logic [AW-1:0]  rp;          // read slot of the MAC
  logic [KW-1:0]  k;           // tap index of the MAC
  logic [CHW-1:0] c;           // channel of the MAC
  logic [$clog2(DECIM+1)-1:0] ph;
  logic           busy;        // MAC walking the taps
  logic           last_ch;     // this input closes a set
  logic           go;          // this input closes the DECIM-th set
  logic           rd_v, rd_last;
  logic [CHW-1:0] rd_ch;
  logic signed [IW-1:0] x_r;
  coef_t          h_r;
  acc_t           acc;

  assign last_ch = (ch_i == CHW'(NCH - 1));
  assign go      = valid_i && last_ch && (ph == $bits(ph)'(DECIM - 1));

  function automatic logic [AW-1:0] dec_ptr(input logic [AW-1:0] p);
    return (p == '0) ? AW'(DEPTH - 1) : p - 1'b1;
  endfunction

  // Rounded, shifted, saturated result of an accumulator value.
  function automatic logic signed [OW-1:0] finish(input acc_t a);
    acc_t r;
    r = (a + (acc_t'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (r > acc_t'({1'b0, {(OW-1){1'b1}}}))            return {1'b0, {(OW-1){1'b1}}};
    if (r < -acc_t'({1'b0, {(OW-1){1'b1}}}) - acc_t'(1)) return {1'b1, {(OW-1){1'b0}}};
    return r[OW-1:0];
  endfunction

  always_ff @(posedge clk) begin
    valid_o <= 1'b0;
    rd_v    <= 1'b0;
    rd_last <= 1'b0;
    if (rst) begin
      wp    <= '0;
      start <= '0;
      rp    <= '0;
      k     <= '0;
      c     <= '0;
      ph    <= '0;
      busy  <= 1'b0;
      acc   <= '0;
      for (int ch = 0; ch < int'(NCH); ch++)
        for (int i = 0; i < int'(DEPTH); i++) xbuf[ch][i] <= '0;
    end else begin
      // Input side: one write per clock.
      if (valid_i) begin
        xbuf[ch_i][wp] <= x_i;
        if (last_ch) begin
          wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
          ph <= (ph == $bits(ph)'(DECIM - 1)) ? '0 : ph + 1'b1;
        end
      end
      // MAC stage 1: read one sample and one tap.
      if (go) begin
        busy  <= 1'b1;
        start <= wp;
        rp    <= wp;
        k     <= '0;
        c     <= '0;
      end else if (busy) begin
        x_r   <= xbuf[c][rp];
        h_r   <= H[k];
        rd_v  <= 1'b1;
        rd_ch <= c;
        if (k == KW'(TAPS - 1)) begin
          rd_last <= 1'b1;
          k       <= '0;
          rp      <= start;
          c       <= c + 1'b1;
          if (c == CHW'(NCH - 1)) busy <= 1'b0;
        end else begin
          k  <= k + 1'b1;
          rp <= dec_ptr(rp);
        end
      end
      // MAC stage 2: accumulate, close a channel on its last tap.
      if (rd_v) begin
        if (rd_last) begin
          y_o     <= finish(acc + acc_t'(x_r) * acc_t'(h_r));
          ch_o    <= rd_ch;
          valid_o <= 1'b1;
          acc     <= '0;
        end else begin
          acc <= acc + acc_t'(x_r) * acc_t'(h_r);
        end
      end
    end
  end

  // The MAC must be done with one window before the next one is complete.
  assert property (@(posedge clk) disable iff (rst) (go |-> !busy))
    else $error("fir_decimator: new window while the MAC was busy");
endmodule
