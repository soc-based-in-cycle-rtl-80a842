// ltc2315_model: behavioural model of one 12-bit serial ADC of the
// LTC2315-12 kind, for simulation only (not synthesizable logic).
//
// The analog input is represented by the 12-bit code code_i. The falling edge
// of cs_n samples code_i and drives a leading zero on sdo; each falling edge
// of sck then moves to the next bit: the 12 data bits MSB first, followed by
// zeros. While cs_n is high, sdo is 0 (the real part floats its output).
module ltc2315_model #(
  parameter int unsigned DW = 12,
  parameter int unsigned LEAD_BITS = 1
) (
  input  logic          cs_n,
  input  logic          sck,
  input  logic [DW-1:0] code_i,
  output logic          sdo
);
  logic [DW-1:0] held = '0;
  int            pos  = 0;

  always @(negedge cs_n) begin
    held = code_i;
    pos  = 0;
  end
  always @(negedge sck) if (!cs_n) pos = pos + 1;

  always_comb begin
    if (cs_n || pos < int'(LEAD_BITS) || pos >= int'(LEAD_BITS + DW)) sdo = 1'b0;
    else sdo = held[DW - 1 - (pos - int'(LEAD_BITS))];
  end
endmodule
