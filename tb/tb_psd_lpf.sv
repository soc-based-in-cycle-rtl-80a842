// tb_psd_lpf: drives the three-stage, four-channel filter at the ADC rate
// (one input set per 36 clocks, the four channels on consecutive clocks).
// Each channel carries its own DC level plus a large 80 kHz tone, the kind
// of product a 40 kHz switching frequency gives after mixing. Checks one
// output per channel per 32 input sets, in channel order, unit DC gain with
// the tone removed on every channel (so a mix-up between channels shows),
// and the group delay: after a step on channel 2 its output must pass half
// of the step 53 to 54 outputs later (53.3 output samples, 614 us).
module tb_psd_lpf;
  localparam int NCH = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic valid_i = 0, valid_o;
  logic [1:0] ch = '0, ch_o;
  logic signed [30:0] x = '0;
  logic signed [31:0] y;

  psd_lpf dut (.clk, .rst, .valid_i, .ch_i(ch), .x_i(x), .valid_o, .ch_o, .y_o(y));

  int nin = 0, nout = 0, nword = 0, step_out = -1, half_out = -1;
  longint level [NCH] = '{-100000000, 200000000, -100000000, 50000000};
  real tone_ph [NCH] = '{0.0, 1.0, 2.0, 3.0};

  always @(posedge clk) if (valid_o) begin
    checks++;
    if (int'(ch_o) != nword % NCH) begin failures++; $display("channel order: %0d at word %0d", ch_o, nword); end
    nword++;
    if (ch_o == 2'd3) begin
      nout++;
      checks++;
      if (nin < nout * 32 || nin > nout * 32 + 32) begin failures++; $display("rate: %0d inputs, %0d outputs", nin, nout); end
    end
    if (ch_o == 2'd2 && step_out >= 0 && half_out < 0 && longint'(y) > 100000000) half_out = nout + 1;
    // settled region of each level
    if ((nout > 160 && nout < 199) || nout > 360) begin
      checks++;
      if (longint'(y) > level[ch_o] + 2000 || longint'(y) < level[ch_o] - 2000) begin
        failures++;
        if (failures < 10) $display("out %0d ch %0d: %0d, expected %0d", nout, ch_o, y, level[ch_o]);
      end
    end
  end

  initial begin
    real ph;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 32 * 400; n++) begin
      if (n == 32 * 200) begin level[2] = 300000000; step_out = n / 32; end
      repeat (32) @(posedge clk);
      for (int c = 0; c < NCH; c++) begin
        @(negedge clk);
        // 80 kHz at 2.78 Msps
        ph = 2.0 * 3.14159265358979 * 80.0e3 * real'(n) * 36.0e-8 + tone_ph[c];
        x = 31'(level[c] + longint'($rtoi(600000000.0 * $cos(ph))));
        ch = 2'(c);
        valid_i = 1;
      end
      nin++;
      @(negedge clk) valid_i = 0;
    end
    repeat (2000) @(posedge clk);
    checks++;
    if (half_out - step_out < 53 || half_out - step_out > 54) begin
      failures++; $display("group delay %0d outputs", half_out - step_out);
    end
    $display("group delay: half step after %0d outputs", half_out - step_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (32 * 400 * 37 + 10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
