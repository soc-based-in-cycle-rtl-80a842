// tb_axil_regs: AXI4-Lite accesses against the register map: reset values
// (both tuning words 25166 = 75 kHz), writes with address and data arriving
// in either order, byte strobes, read-only and unmapped addresses (SLVERR),
// responses held until accepted, and the decoded core-side outputs.
module tb_axil_regs;
  import lid_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [5:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [31:0] wdata = '0, rdata;
  logic [3:0]  wstrb = '0;
  logic [1:0]  bresp, rresp;
  logic [1:0]  mod_en;
  logic        adc_en, stream_en;
  vmode_e      vmode [2];
  logic [24:0] ftw [2];
  logic [31:0] ovf_cnt = 32'd77;

  axil_regs dut (.clk, .rst,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .mod_en_o(mod_en), .adc_en_o(adc_en), .stream_en_o(stream_en), .vmode_o(vmode),
    .ftw_o(ftw), .ovf_cnt_i(ovf_cnt));

  task automatic wr(input logic [5:0] a, input logic [31:0] d, input logic [3:0] s,
                    input int gap, input logic [1:0] exp_resp);
    @(negedge clk);
    if (gap >= 0) begin awaddr = a; awvalid = 1; end
    else begin wdata = d; wstrb = s; wvalid = 1; end
    repeat ((gap < 0) ? -gap : gap) @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = s; wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk) begin awvalid = 0; wvalid = 0; end
    repeat (2) @(negedge clk);     // response must wait for bready
    checks++;
    if (!bvalid || bresp != exp_resp) begin failures++; $display("write %h resp %b v %b", a, bresp, bvalid); end
    bready = 1;
    @(negedge clk) bready = 0;
    checks++;
    if (bvalid) failures++;
  endtask

  task automatic rd(input logic [5:0] a, input logic [31:0] exp_d, input logic [1:0] exp_resp);
    @(negedge clk);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk) arvalid = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (!rvalid || rdata != exp_d || rresp != exp_resp) begin
      failures++; $display("read %h: %h exp %h resp %b", a, rdata, exp_d, rresp);
    end
    rready = 1;
    @(negedge clk) rready = 0;
  endtask

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("%s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    rd(6'h04, 32'd25166, 2'b00);
    rd(6'h08, 32'd25166, 2'b00);
    rd(6'h00, 32'd0, 2'b00);
    rd(6'h10, 32'h4C49_020C, 2'b00);
    chk(mod_en == 0 && !adc_en && !stream_en, "reset outputs");
    wr(6'h00, 32'h0000_002D, 4'hF, 0, 2'b00);      // en0, adc, stream, vmode1
    chk(mod_en == 2'b01 && adc_en && stream_en && vmode[0] == VMODE_RL && vmode[1] == VMODE_RLC,
        "ctrl decode");
    wr(6'h04, 32'h0000_346E, 4'hF, 3, 2'b00);      // address first
    wr(6'h08, 32'h0000_6248, 4'hF, -2, 2'b00);     // data first
    chk(ftw[0] == 25'h346E && ftw[1] == 25'h6248, "ftw outputs");
    wr(6'h08, 32'hFFFF_FFFF, 4'hC, 0, 2'b00);      // upper bytes only, bits above 24 dropped
    rd(6'h08, 32'h01FF_6248, 2'b00);
    wr(6'h0C, 32'h1234_5678, 4'hF, 0, 2'b00);      // read-only
    rd(6'h0C, 32'd77, 2'b00);
    wr(6'h20, 32'h1, 4'hF, 0, 2'b10);              // unmapped
    rd(6'h24, 32'h0, 2'b10);
    rd(6'h00, 32'h2D, 2'b00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
