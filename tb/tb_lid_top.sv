// tb_lid_top: end-to-end test of the load-identification core at its
// default sizes (211-tap filters, two loads, 32-word stream FIFO).
//
// A plant model here produces, for each load, the analog signals the six
// converter models digitize: load current i_L (with a 3rd harmonic), load
// voltage v_L = Z i_L at the fundamental, capacitor voltage v_c, and v_o =
// v_c + v_L. Its phase runs from an accumulator advanced by the same tuning
// word that is written to the core, so the plant is synchronous with the
// modulator. The test programs the core over AXI4-Lite, collects the result
// frames from AXI4-Stream and computes R and X = omega L of each load from
// every frame, as host software would.
//
// Sequence and mechanisms exercised:
//   1. load 0 at 40 kHz, load 1 at its reset frequency 75 kHz, both in the
//      R-L voltage mode: identified Z must match the plant's Z;
//   2. voltage-mode switch of load 0 to R-L-C: Z must move to Z + V_c/I;
//   3. in-cycle tracking: load 0's current follows a rectified 50 Hz bus
//      envelope and its R and L change with that excitation; the identified
//      values must follow them (614 us later) through half a bus period;
//   4. stream stall: the sink stops, frames are dropped and counted; the
//      count read over AXI4-Lite must equal the missing frames;
// and throughout: one frame per 1152 clocks, tlast on every 10th word, the
// tuning words in the frames, gate switching frequency.
module tb_lid_top;
  import lid_pkg::*;
  localparam real PI2 = 2.0 * 3.14159265358979;
  localparam int unsigned FTW0 = 13422, FTW1 = 25166;
  localparam real PERIOD_NS = 10.0;

  logic clk = 0, aresetn = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [5:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 0, wvalid = 0, bready = 1, arvalid = 0, rready = 1;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [31:0] wdata = '0, rdata;
  logic [1:0]  bresp, rresp;
  logic        cs_n, sck;
  logic [5:0]  sdo;
  logic [1:0]  gate_hi, gate_lo;
  logic [31:0] tdata;
  logic        tvalid, tready = 1, tlast, stream_ovf;

  lid_top dut (.clk, .aresetn,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(4'hF), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .adc_cs_n(cs_n), .adc_sck(sck), .adc_sdo(sdo),
    .gate_hi, .gate_lo,
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready), .m_axis_tlast(tlast),
    .stream_ovf);

  // ---------------------------------------------------------------- plant
  logic [11:0] code [6];
  for (genvar c = 0; c < 6; c++) begin : g_adc
    ltc2315_model u_adc (.cs_n, .sck, .code_i(code[c]), .sdo(sdo[c]));
  end

  longint acc [2] = '{0, 0};
  logic   run [2] = '{0, 0};
  int     cyc = 0;
  bit     envelope_on = 0;
  int     env_start = 0;
  real    amp_i [2] = '{1500.0, 1200.0};
  real    amp_c [2] = '{400.0, 500.0};
  real    phi_i [2] = '{0.7, -1.2};
  real    phi_c [2] = '{-0.9, 2.0};
  real    zr [2] = '{0.5, 0.3};
  real    zx [2] = '{0.8, 1.1};

  // Excitation-dependent load 0 in step 3: R and X rise with the bus level.
  function automatic real bus_env(input int c);
    return $sqrt(0.04 + 0.96 * $sin(PI2 * 50.0 * real'(c) * PERIOD_NS * 1.0e-9) ** 2);
  endfunction
  function automatic real r_of(input real e);  return 0.45 + 0.20 * e; endfunction
  function automatic real x_of(input real e);  return 0.85 - 0.25 * e; endfunction

  always @(negedge clk) begin
    cyc++;
    for (int l = 0; l < 2; l++) begin
      real th, ai, r, x, il, vl, vc;
      if (run[l]) acc[l] = (acc[l] + ((l == 0) ? FTW0 : FTW1)) & 64'h1FF_FFFF;
      th = PI2 * real'(acc[l]) / 33554432.0;
      ai = amp_i[l]; r = zr[l]; x = zx[l];
      if (l == 0 && envelope_on) begin
        ai = amp_i[0] * bus_env(cyc - env_start);
        r  = r_of(bus_env(cyc - env_start));
        x  = x_of(bus_env(cyc - env_start));
      end
      il = ai * $cos(th + phi_i[l]) + 0.1 * ai * $cos(3.0 * (th + phi_i[l]));
      vl = ai * (r * $cos(th + phi_i[l]) - x * $sin(th + phi_i[l]));
      vc = amp_c[l] * $cos(th + phi_c[l]);
      code[3*l+0] = 12'($rtoi(2048.5 + vc + vl));
      code[3*l+1] = 12'($rtoi(2048.5 + vc));
      code[3*l+2] = 12'($rtoi(2048.5 + il));
    end
  end

  // ------------------------------------------------------------ AXI4-Lite
  task automatic axil_write(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr = a; wdata = d; awvalid = 1; wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk) begin awvalid = 0; wvalid = 0; end
    while (!bvalid) @(negedge clk);
    checks++;
    if (bresp != 2'b00) failures++;
  endtask

  task automatic axil_read(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk) arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
  endtask

  // ------------------------------------------------------- result checking
  real exp_r [2], exp_x [2];
  int  settle_from [2] = '{1 << 30, 1 << 30};  // frame index from which to check
  int  frames = 0, words = 0, last_frame_cyc = -1;
  int  n_checked [2] = '{0, 0};
  int  n_track = 0, n_rate = 0, n_switch = 0, n_drop = 0;
  logic [31:0] fw [10];
  bit  tracking = 0;

  always @(posedge clk) if (aresetn && tvalid && tready) begin
    fw[words % 10] = tdata;
    words++;
    checks++;
    if (tlast != (words % 10 == 0)) begin failures++; $display("tlast misplaced at word %0d", words); end
    if (tlast) begin
      frames++;
      if (last_frame_cyc >= 0 && tready_steady) begin
        checks++;
        n_rate++;
        if (cyc - last_frame_cyc != 1152) begin failures++; $display("frame spacing %0d", cyc - last_frame_cyc); end
      end
      last_frame_cyc = cyc;
      check_frame();
    end
  end

  bit tready_steady = 1;

  task automatic check_frame();
    for (int l = 0; l < 2; l++) begin
      real vc, vs, ic, is, d, rh, xh, er, ex, tol;
      vc = real'($signed(fw[5*l+0])); vs = real'($signed(fw[5*l+1]));
      ic = real'($signed(fw[5*l+2])); is = real'($signed(fw[5*l+3]));
      d  = ic * ic + is * is;
      rh = (vc * ic + vs * is) / d;
      xh = (vc * is - vs * ic) / d;
      checks++;
      if (fw[5*l+4] != ((l == 0) ? FTW0 : FTW1)) begin failures++; $display("ftw word %0d", fw[5*l+4]); end
      er = exp_r[l]; ex = exp_x[l]; tol = 0.003;
      if (l == 0 && tracking) begin
        // expected values 614 us (61400 clocks) ago
        real e;
        e  = bus_env(cyc - env_start - 61400);
        er = r_of(e); ex = x_of(e); tol = 0.02;
        if (e < 0.5) continue;      // low excitation, few ADC codes
        n_track++;
      end else if (frames < settle_from[l]) continue;
      checks++;
      n_checked[l]++;
      if (rh > er + tol || rh < er - tol || xh > ex + tol || xh < ex - tol) begin
        failures++;
        if (failures < 12) $display("frame %0d load %0d: R %f X %f, expected %f %f", frames, l, rh, xh, er, ex);
      end
      if (n_checked[l] % 100 == 1)
        $display("frame %0d load %0d: R %f X %f (expected %f %f)", frames, l, rh, xh, er, ex);
    end
  endtask

  // Impedance seen with v_o alone: Z + V_c / I
  task automatic expect_rlc(input int l);
    real ir, ii, cr, ci, dd;
    ir = amp_i[l] * $cos(phi_i[l]); ii = amp_i[l] * $sin(phi_i[l]);
    cr = amp_c[l] * $cos(phi_c[l]); ci = amp_c[l] * $sin(phi_c[l]);
    dd = ir * ir + ii * ii;
    exp_r[l] = zr[l] + (cr * ir + ci * ii) / dd;
    exp_x[l] = zx[l] + (ci * ir - cr * ii) / dd;
  endtask

  // gate frequency of load 0
  int rises0 = 0, first_rise0 = -1, last_rise0 = -1;
  logic gh0_d = 0;
  always @(posedge clk) begin
    if (gate_hi[0] && !gh0_d) begin
      rises0++;
      if (first_rise0 < 0) first_rise0 = cyc;
      last_rise0 = cyc;
    end
    gh0_d = gate_hi[0];
  end

  // --------------------------------------------------------------- sequence
  initial begin
    logic [31:0] d;
    int f0, dropped;
    real fsw;
    for (int l = 0; l < 2; l++) begin exp_r[l] = zr[l]; exp_x[l] = zx[l]; end
    repeat (5) @(posedge clk);
    aresetn = 1;
    axil_read(6'h10, d);
    checks++;
    if (d != 32'h4C49_020C) failures++;
    axil_write(6'h04, FTW0);                 // load 0: 40 kHz; load 1 keeps 75 kHz
    axil_write(6'h00, 32'h0000_000F);        // modulators, ADCs, stream on, R-L mode
    run[0] = 1; run[1] = 1;
    settle_from = '{frames + 130, frames + 130};
    wait (frames >= 260);
    // gate frequency: 2**25 / 13422 = 2500 clocks
    fsw = 1.0e8 * real'(rises0 - 1) / real'(last_rise0 - first_rise0);
    checks++;
    if (fsw < 39990.0 || fsw > 40010.0) begin failures++; $display("f_sw %f", fsw); end

    // 2. voltage-mode switch of load 0
    axil_write(6'h00, 32'h0000_001F);
    n_switch++;
    expect_rlc(0);
    settle_from[0] = frames + 130;
    wait (frames >= 420);

    // 3. in-cycle tracking over half a bus period
    axil_write(6'h00, 32'h0000_000F);
    n_switch++;
    exp_r[0] = zr[0]; exp_x[0] = zx[0];
    settle_from[0] = 1 << 30;
    envelope_on = 1;
    env_start = cyc;
    wait (frames >= 420 + 130);
    tracking = 1;
    wait (cyc - env_start > 1_000_000 + 61400);
    tracking = 0;
    envelope_on = 0;
    settle_from[0] = frames + 130;

    // 4. stream stall
    f0 = frames;
    @(negedge clk) begin tready = 0; tready_steady = 0; end
    repeat (1152 * 12) @(posedge clk);
    checks++;
    if (!stream_ovf) begin failures++; $display("no overflow flag"); end
    @(negedge clk) tready = 1;
    repeat (1152 * 3) @(posedge clk);
    axil_read(6'h0C, d);
    dropped = int'(d);
    n_drop = dropped;
    // frames before the stall + 3 buffered + those after = all produced
    checks++;
    if (dropped < 8 || dropped > 10) begin failures++; $display("dropped %0d", dropped); end
    last_frame_cyc = -1;
    tready_steady = 1;
    repeat (1152 * 20) @(posedge clk);

    // every mechanism must have happened
    checks++;
    if (n_checked[0] == 0 || n_checked[1] == 0 || n_track == 0 || n_rate == 0 || n_switch == 0 || n_drop == 0) begin
      failures++;
    end
    $display("checked frames: load0 %0d load1 %0d, tracking %0d, rate %0d, mode switches %0d, dropped %0d",
             n_checked[0], n_checked[1], n_track, n_rate, n_switch, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_500_000) @(posedge clk);
    failures++;
    $display("watchdog: frames %0d", frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
