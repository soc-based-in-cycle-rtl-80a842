// cic_decimator: time-multiplexed cascaded integrator-comb decimation filter,
// first stage of the PSD low-pass filter.
//
// NCH independent channels share one adder chain. Samples arrive one per
// clock, tagged with their channel number ch_i; a full input set is channels
// 0 .. NCH-1 in order (possibly with gaps between clocks). For each channel,
// N integrators run at the input rate; after every R-th set the integrator
// output is passed through N comb sections (differential delay 1). The
// response of each channel is (sum_{k<R} z^-k)^N with DC gain R**N; the
// output is full precision, OW = IW + N log2(R) bits, and wraps harmlessly
// inside the integrators (two's-complement arithmetic). Integrator and comb
// states are kept in per-channel registers indexed by the channel tag.
//
// Timing: for every input of the R-th set, valid_o pulses one clock later
// with ch_o = that input's channel and y_o its filter output; the outputs of
// one set therefore leave in channel order, like the inputs.
//
// From the source design: CIC filter with decimation factor 8, shared
// between channels by time-division multiplexing. This design's own choice:
// N = 4 sections, the order whose group delay, added to that of the two FIR
// stages, gives the quoted total of 53.3 output samples.
module cic_decimator #(
  parameter int unsigned IW  = 31,
  parameter int unsigned N   = 4,
  parameter int unsigned R   = 8,
  parameter int unsigned NCH = 4,
  parameter int unsigned OW  = IW + N * $clog2(R),
  parameter int unsigned CHW = (NCH > 1) ? $clog2(NCH) : 1
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
  typedef logic signed [OW-1:0] acc_t;
  typedef acc_t stages_t [N];

  stages_t integ  [NCH];
  stages_t comb_d [NCH];
  logic [$clog2(R)-1:0] dcnt;   // index of the current set within R
  logic last_ch;

  assign last_ch = (ch_i == CHW'(NCH - 1));

  // Integrator chain of the addressed channel after this input.
  stages_t integ_next;
  always_comb begin
    integ_next[0] = integ[ch_i][0] + acc_t'(x_i);
    for (int s = 1; s < int'(N); s++) integ_next[s] = integ[ch_i][s] + integ_next[s-1];
  end

  // Comb chain on the decimated sample of the addressed channel.
  acc_t comb_in [N+1];
  always_comb begin
    comb_in[0] = integ_next[N-1];
    for (int s = 0; s < int'(N); s++) comb_in[s+1] = comb_in[s] - comb_d[ch_i][s];
  end

  always_ff @(posedge clk) begin
    valid_o <= 1'b0;
    if (rst) begin
      for (int c = 0; c < int'(NCH); c++)
        for (int s = 0; s < int'(N); s++) begin
          integ[c][s]  <= '0;
          comb_d[c][s] <= '0;
        end
      dcnt <= '0;
    end else if (valid_i) begin
      integ[ch_i] <= integ_next;
      if (last_ch) dcnt <= (dcnt == $bits(dcnt)'(R - 1)) ? '0 : dcnt + 1'b1;
      if (dcnt == $bits(dcnt)'(R - 1)) begin
        for (int s = 0; s < int'(N); s++) comb_d[ch_i][s] <= comb_in[s];
        y_o     <= comb_in[N];
        ch_o    <= ch_i;
        valid_o <= 1'b1;
      end
    end
  end

  if (NCH > 1) begin : g_order
    // Channels of a set arrive in order.
    logic [CHW-1:0] expect_ch;
    always_ff @(posedge clk)
      if (rst) expect_ch <= '0;
      else if (valid_i) expect_ch <= last_ch ? '0 : ch_i + 1'b1;
    assert property (@(posedge clk) disable iff (rst) (valid_i |-> ch_i == expect_ch))
      else $error("cic_decimator: channel out of order");
  end
endmodule
