// tdm_serializer: time-division multiplexer that turns NCH words presented
// together into NCH consecutive one-word transfers tagged with their channel
// number, so that one filter chain can serve all of them.
//
// When valid_i is high, the NCH inputs are captured; in the following NCH
// clocks valid_o is high and (ch_o, y_o) walk through channels 0 .. NCH-1.
// A new set may be presented once the previous one has left, i.e. at most
// every NCH clocks (checked by an assertion); the detectors present one set
// every 36 clocks.
//
// From the source design: channels are time-multiplexed into the shared
// filters. The capture-then-shift form is this design's own.
module tdm_serializer #(
  parameter int unsigned W   = 31,
  parameter int unsigned NCH = 4,
  parameter int unsigned CHW = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          valid_i,
  input  logic [W-1:0]  x_i [NCH],
  output logic          valid_o,
  output logic [CHW-1:0] ch_o,
  output logic [W-1:0]  y_o
);
  logic [W-1:0] hold [NCH];
  logic         busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      ch_o <= '0;
    end else if (valid_i) begin
      hold <= x_i;
      busy <= 1'b1;
      ch_o <= '0;
    end else if (busy) begin
      if (ch_o == CHW'(NCH - 1)) busy <= 1'b0;
      ch_o <= ch_o + 1'b1;
    end
  end

  assign valid_o = busy;
  assign y_o     = hold[ch_o];

  assert property (@(posedge clk) disable iff (rst)
                   (valid_i |-> (!busy || ch_o == CHW'(NCH - 1))))
    else $error("tdm_serializer: new set before the previous one left");
endmodule
