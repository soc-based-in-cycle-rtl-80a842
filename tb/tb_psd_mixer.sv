// tb_psd_mixer: random samples and references, including the extreme
// values, against products computed here; checks the one-clock latency.
module tb_psd_mixer;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic valid_i = 0, valid_o;
  logic signed [12:0] x;
  logic signed [17:0] rc, rs;
  logic signed [30:0] sc, ss;

  psd_mixer #(.XW(13), .RW(18)) dut (.clk, .rst, .valid_i, .x_i(x), .rc_i(rc), .rs_i(rs),
                                     .valid_o, .sc_o(sc), .ss_o(ss));

  initial begin
    longint ex_c, ex_s;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      valid_i = 1;
      x  = (n == 0) ? -13'sd4096 : 13'($urandom);
      rc = (n == 0) ? -18'sd131072 : 18'($urandom);
      rs = (n == 1) ? 18'sd131071 : 18'($urandom);
      ex_c = longint'(x) * longint'(rc);
      ex_s = longint'(x) * longint'(rs);
      @(posedge clk); #1;
      checks++;
      if (!valid_o || longint'(sc) != ex_c || longint'(ss) != ex_s) begin
        failures++;
        if (failures < 10) $display("x %0d rc %0d rs %0d: %0d %0d", x, rc, rs, sc, ss);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
