// tb_load_identifier: feeds the detector of one load with synthetic 12-bit
// samples at 2.78 Msps: a 40 kHz load current i_L and a load voltage
// v_L = Z i_L with Z = 0.5 + j0.8 (in ADC-count ratio), plus a capacitor
// voltage v_c, so that v_o = v_c + v_L. The reference phase comes from a
// 25-bit accumulator kept here. From every result the impedance is computed
// as V/I and compared with the expected one: Z in the R-L voltage mode and
// Z + V_c/I in the R-L-C mode, after the filter has settled each time. Also
// checks one result per 32 samples.
module tb_load_identifier;
  import lid_pkg::*;
  localparam real PI2 = 2.0 * 3.14159265358979;
  localparam int unsigned FTW = 13422;          // 40.0 kHz
  localparam real ZR = 0.5, ZX = 0.8;           // load impedance
  localparam real AI = 1500.0, PHI_I = 0.7;     // current amplitude, phase
  localparam real AC = 400.0, PHI_C = -0.9;     // capacitor voltage

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  vmode_e vmode = VMODE_RL;
  logic valid_i = 0, valid_o;
  logic [11:0] vo, vc, il;
  logic [9:0]  phase;
  psd_result_t res;

  load_identifier dut (.clk, .rst, .vmode_i(vmode), .valid_i, .vo_i(vo), .vc_i(vc), .il_i(il),
                       .phase_i(phase), .valid_o, .res_o(res));

  int nout = 0, nin = 0, phase_out = 0;
  real er, ex;

  always @(posedge clk) if (valid_o) begin
    real d, rh, xh;
    nout++;
    phase_out++;
    d  = real'(res.ic) * real'(res.ic) + real'(res.is) * real'(res.is);
    rh = (real'(res.vc) * real'(res.ic) + real'(res.vs) * real'(res.is)) / d;
    xh = (real'(res.vc) * real'(res.is) - real'(res.vs) * real'(res.ic)) / d;
    if (phase_out > 130) begin
      checks++;
      if (rh > er + 0.002 || rh < er - 0.002 || xh > ex + 0.002 || xh < ex - 0.002) begin
        failures++;
        if (failures < 10) $display("out %0d mode %0d: R %f X %f, expected %f %f", nout, vmode, rh, xh, er, ex);
      end
    end
    if (phase_out == 150) $display("mode %0d: R %f X %f (expected %f %f)", vmode, rh, xh, er, ex);
    checks++;
    if (nin < nout * 32 || nin > nout * 32 + 32) failures++;  // shared-filter latency < 32 samples
  end

  longint acc = 0;
  always @(posedge clk) acc <= (acc + FTW) & 64'h1FF_FFFF;

  initial begin
    real th, i_ac, vl, vcap;
    // expected impedance in each mode
    real ir, ii, cr, ci, dd;
    ir = AI * $cos(PHI_I); ii = AI * $sin(PHI_I);
    cr = AC * $cos(PHI_C); ci = AC * $sin(PHI_C);
    dd = ir * ir + ii * ii;
    er = ZR; ex = ZX;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 32 * 400; n++) begin
      if (n == 32 * 200) begin
        vmode = VMODE_RLC;
        phase_out = 0;
        er = ZR + (cr * ir + ci * ii) / dd;
        ex = ZX + (ci * ir - cr * ii) / dd;
      end
      repeat (35) @(posedge clk);
      @(negedge clk);
      th   = PI2 * real'(acc) / 33554432.0;
      i_ac = AI * $cos(th + PHI_I);
      vl   = AI * (ZR * $cos(th + PHI_I) - ZX * $sin(th + PHI_I));
      vcap = AC * $cos(th + PHI_C);
      il = 12'($rtoi(2048.5 + i_ac));
      vc = 12'($rtoi(2048.5 + vcap));
      vo = 12'($rtoi(2048.5 + vcap + vl));
      phase = 10'(acc >> 15);
      valid_i = 1;
      nin++;
      @(negedge clk) valid_i = 0;
    end
    repeat (400) @(posedge clk);
    checks++;
    if (nout < 399) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (32 * 400 * 37 + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
