// tb_sine_ref_gen: sweeps all 1024 phases through the reference generator
// and compares sine and cosine with values computed here in floating point
// (within 1 LSB), and checks the one-clock latency.
module tb_sine_ref_gen;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic valid_i = 0, valid_o;
  logic [9:0] phase_i = '0;
  logic signed [17:0] rc, rs;

  sine_ref_gen dut (.clk, .rst, .valid_i, .phase_i, .valid_o, .rc_o(rc), .rs_o(rs));

  function automatic int expect_v(input real ang);
    real v = 131071.0 * ang;
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  initial begin
    real th;
    int es, ec;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int p = 0; p < 1024; p++) begin
      @(negedge clk);
      phase_i = 10'(p);
      valid_i = 1;
      @(posedge clk); #1;
      th = 2.0 * 3.14159265358979 * (real'(p) + 0.5) / 1024.0;
      es = expect_v($sin(th));
      ec = expect_v($cos(th));
      checks++;
      if (!valid_o || rs > es + 1 || rs < es - 1 || rc > ec + 1 || rc < ec - 1) begin
        failures++;
        if (failures < 10) $display("phase %0d: sin %0d (exp %0d) cos %0d (exp %0d) v=%b", p, rs, es, rc, ec, valid_o);
      end
    end
    @(negedge clk) valid_i = 0;
    @(posedge clk); #1;
    checks++;
    if (valid_o) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
