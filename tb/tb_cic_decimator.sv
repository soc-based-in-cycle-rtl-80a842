// tb_cic_decimator: the 4-channel time-multiplexed CIC (4 sections,
// decimation 8) is compared, channel by channel, with its equivalent FIR,
// the 29 taps of (1 + z^-1 + ... + z^-7)^4 computed here by polynomial
// multiplication. The four channels carry different signals (full-scale
// constants of both signs and random words), so a mix-up between channels
// shows. Inputs arrive in channel order on irregular clocks; for every input
// of each 8th set one output must appear one clock later with the same
// channel tag, and no output at any other time.
module tb_cic_decimator;
  localparam int N = 4, R = 8, NCH = 4, L = N * (R - 1) + 1;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic valid_i = 0, valid_o;
  logic [1:0] ch = '0, ch_o;
  logic signed [30:0] x = '0;
  logic signed [42:0] y;

  cic_decimator #(.IW(31), .N(N), .R(R), .NCH(NCH)) dut (
    .clk, .rst, .valid_i, .ch_i(ch), .x_i(x), .valid_o, .ch_o, .y_o(y));

  longint h [L];
  longint hist [NCH][L];   // hist[c][0] newest
  int nset = 0;

  initial begin
    longint t [L];
    for (int k = 0; k < L; k++) h[k] = (k == 0);
    for (int s = 0; s < N; s++) begin
      for (int k = 0; k < L; k++) begin
        t[k] = 0;
        for (int j = 0; j < R; j++) if (k - j >= 0) t[k] += h[k - j];
      end
      h = t;
    end
    for (int c = 0; c < NCH; c++) for (int k = 0; k < L; k++) hist[c][k] = 0;
  end

  function automatic logic signed [30:0] stim(int c, int n);
    if (n < 320) return (c % 2 == 0) ? 31'sh3FFF_FFFF : -31'sh4000_0000;
    if (n >= 640 && n < 960 && c == 1) return -31'sh4000_0000;
    if (c == 3)  return 31'(n * 1000);
    return 31'($urandom);
  endfunction

  initial begin
    longint ex;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 8 * 300; n++) begin
      nset = n + 1;
      for (int c = 0; c < NCH; c++) begin
        @(negedge clk);
        valid_i = 1;
        ch = 2'(c);
        x = stim(c, n);
        for (int k = L - 1; k > 0; k--) hist[c][k] = hist[c][k - 1];
        hist[c][0] = x;
        @(posedge clk); #1;
        valid_i = 0;
        checks++;
        if (nset % R == 0) begin
          ex = 0;
          for (int k = 0; k < L; k++) ex += h[k] * hist[c][k];
          if (!valid_o || ch_o != 2'(c) || longint'(y) != ex) begin
            failures++;
            if (failures < 10) $display("set %0d ch %0d: valid %0d ch_o %0d got %0d exp %0d",
                                        nset, c, valid_o, ch_o, y, ex);
          end
        end else if (valid_o) failures++;
        repeat ($urandom_range(0, 1)) @(posedge clk);
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
