// tb_dds_modulator: runs the phase-accumulator modulator at 75 kHz and
// 40 kHz and compares phase and gates every clock with a reference
// accumulator kept here; checks the switching period, duty 0.5, a tuning-word
// change without phase jump, and that disabling turns both gates off.
module tb_dds_modulator;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enable = 0;
  logic [24:0] ftw = 25'd25166;
  logic [9:0] phase;
  logic gh, gl;

  dds_modulator dut (.clk, .rst, .enable_i(enable), .ftw_i(ftw),
                     .phase_o(phase), .gate_hi_o(gh), .gate_lo_o(gl));

  longint model = 0;        // accumulator value before this clock
  int hi_cnt = 0, rises = 0, first_rise = -1, last_rise = -1, cyc = 0;
  logic gh_d = 0;

  task automatic run(input int n, input logic [24:0] f);
    ftw = f;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      cyc++;
      // dut outputs show the accumulator value before this edge
      checks++;
      if (phase != 10'(model >> 15) || gh != ~model[24] || gl != model[24]) begin
        failures++;
        if (failures < 10) $display("cyc %0d phase %0d exp %0d", cyc, phase, 10'(model >> 15));
      end
      model = (model + f) & 64'h1FF_FFFF;
      if (gh) hi_cnt++;
      if (gh && !gh_d) begin
        rises++;
        if (first_rise < 0) first_rise = cyc;
        last_rise = cyc;
      end
      gh_d = gh;
    end
  endtask

  initial begin
    real period, duty;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk) enable = 1;
    @(posedge clk); #1;      // first enabled edge loads acc = ftw, outputs show 0
    model = ftw;
    cyc = 0;
    run(200000, 25'd25166);
    period = real'(last_rise - first_rise) / real'(rises - 1);
    duty   = real'(hi_cnt) / 200000.0;
    checks++;
    // 75 kHz: 2**25 / 25166 = 1333.3 clocks
    if (period < 1332.0 || period > 1334.6) begin failures++; $display("period %f", period); end
    checks++;
    if (duty < 0.495 || duty > 0.505) begin failures++; $display("duty %f", duty); end
    // 40 kHz, no reset of the accumulator in between
    run(50000, 25'd13422);
    // disable
    @(negedge clk) enable = 0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (gh || gl || phase != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
