// tb_fir_decimator: two instances. (A) the default order-3 binomial filter
// (taps 1 3 3 1, /8) against an exact integer model; (B) the order-210
// windowed-sinc filter used after it, against a floating-point model whose
// taps are computed here from the Blackman-windowed sinc (600 Hz cutoff at
// 173.6 ksps), within a few LSB. Both serve four time-multiplexed channels
// that carry different signals, each checked against its own model, and
// decimate by 2; channel c's result must appear, tagged c, (c+1)*TAPS + 1
// clocks after the edge that takes the last input of each second set.
module tb_fir_decimator;
  import lid_pkg::*;
  localparam int TB_TAPS = 211;
  localparam real FCN = 600.0 / (1.0e8 / 36.0 / 16.0);
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NCH = 4;
  logic valid_i = 0, va, vb;
  logic [1:0] ch = '0, cha, chb;
  logic signed [31:0] x = '0, ya, yb;

  fir_decimator dut_a (.clk, .rst, .valid_i, .ch_i(ch), .x_i(x), .valid_o(va), .ch_o(cha), .y_o(ya));
  fir_decimator #(.TAPS(TB_TAPS), .KIND(FIR_SINC_BLACKMAN), .FC_OVER_FS(FCN), .COEF_FRAC(23))
    dut_b (.clk, .rst, .valid_i, .ch_i(ch), .x_i(x), .valid_o(vb), .ch_o(chb), .y_o(yb));

  real hb [TB_TAPS];
  longint hist [NCH][TB_TAPS];
  int nin = 0, cyc = 0, t_in = 0, na = 0, nb = 0;
  longint exp_a [NCH];
  real    exp_b [NCH];

  initial begin
    real s = 0.0, m, w;
    for (int k = 0; k < TB_TAPS; k++) begin
      m = real'(k) - 105.0;
      w = 0.42 - 0.5 * $cos(2.0 * 3.14159265358979 * k / 210.0) + 0.08 * $cos(4.0 * 3.14159265358979 * k / 210.0);
      hb[k] = (k == 105) ? 2.0 * FCN * w : w * $sin(2.0 * 3.14159265358979 * FCN * m) / (3.14159265358979 * m);
      s += hb[k];
      for (int c = 0; c < NCH; c++) hist[c][k] = 0;
    end
    for (int k = 0; k < TB_TAPS; k++) hb[k] = hb[k] / s;
  end

  always @(posedge clk) begin
    cyc++;
    if (valid_i) t_in = cyc;
    if (va) begin
      na++;
      checks++;
      if (longint'(ya) != exp_a[cha]) begin
        failures++; if (failures < 10) $display("A ch %0d got %0d exp %0d", cha, ya, exp_a[cha]);
      end
      checks++;
      if (cyc - t_in != (int'(cha) + 1) * 4 + 2 || int'(cha) != (na - 1) % NCH) begin
        failures++; $display("A ch %0d latency %0d", cha, cyc - t_in);
      end
    end
    if (vb) begin
      nb++;
      checks++;
      if (real'(yb) > exp_b[chb] + 8.0 || real'(yb) < exp_b[chb] - 8.0) begin
        failures++; if (failures < 10) $display("B ch %0d got %0d exp %f", chb, yb, exp_b[chb]);
      end
      checks++;
      if (cyc - t_in != (int'(chb) + 1) * TB_TAPS + 2 || int'(chb) != (nb - 1) % NCH) begin
        failures++; $display("B ch %0d latency %0d", chb, cyc - t_in);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 900; n++) begin
      for (int c = 0; c < NCH; c++) begin
        @(negedge clk);
        valid_i = 1;
        ch = 2'(c);
        if (n < 300)      x = 32'sd1000000 * (c + 1) * ((c % 2 == 1) ? -1 : 1);   // steps
        else if (n < 600) x = 32'($rtoi(1.0e6 * $sin((0.05 + 0.1 * c) * n))); // stop-band tones
        else              x = $signed(32'($urandom)) >>> (12 + c);               // random
        for (int k = TB_TAPS - 1; k > 0; k--) hist[c][k] = hist[c][k - 1];
        hist[c][0] = x;
        if (nin % 2 == 1) begin
          exp_a[c] = (hist[c][0] + 3 * hist[c][1] + 3 * hist[c][2] + hist[c][3] + 4) >>> 3;
          exp_b[c] = 0.0;
          for (int k = 0; k < TB_TAPS; k++) exp_b[c] += hb[k] * real'(hist[c][k]);
        end
      end
      nin++;
      @(negedge clk) valid_i = 0;
      repeat (NCH * TB_TAPS + 10) @(posedge clk);
    end
    repeat (300) @(posedge clk);
    checks++;
    if (na != 450 * NCH || nb != 450 * NCH) begin failures++; $display("outputs %0d %0d", na, nb); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
