// axil_regs: AXI4-Lite slave with the configuration and status registers of
// the load-identification core, used by the processor to set the switching
// frequencies and to configure the core.
//
// Register map (32-bit words, byte addresses):
//   0x00 CTRL   rw  [1:0] modulator enable, load 1..0
//                   [2]   ADC sampling enable
//                   [3]   result stream enable
//                   [5:4] voltage mode, load 1..0 (0: v_o - v_c, 1: v_o)
//   0x04 FTW0   rw  [24:0] frequency tuning word of load 0
//   0x08 FTW1   rw  [24:0] frequency tuning word of load 1
//   0x0C STATUS ro  number of result frames dropped by the stream FIFO
//   0x10 INFO   ro  [31:16] 0x4C49, [15:8] loads, [7:0] ADC bits
// Both tuning words reset to 25166, i.e. 75 kHz, the frequency at which the
// hob starts modulating. Other addresses answer SLVERR (reads return 0).
//
// Handshake: a write is taken when AWVALID and WVALID are both high and no
// write response is pending; BVALID follows one clock later and is held until
// BREADY. A read is taken when ARVALID is high and no read data is pending;
// RVALID follows one clock later and is held until RREADY. WSTRB is honoured
// per byte.
//
// From the source design: an AXI4-Lite link from the processor for switching
// frequency settings and configuration. The register map is this design's own.
module axil_regs
  import lid_pkg::*;
#(
  parameter int unsigned  N_LOADS   = 2,
  parameter logic [PHASE_BITS-1:0] FTW_RESET = PHASE_BITS'(25166)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [5:0]        s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [5:0]        s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // Core side
  output logic [N_LOADS-1:0]    mod_en_o,
  output logic                  adc_en_o,
  output logic                  stream_en_o,
  output vmode_e                vmode_o [N_LOADS],
  output logic [PHASE_BITS-1:0] ftw_o [N_LOADS],
  input  logic [31:0]           ovf_cnt_i
);
  localparam logic [1:0] RESP_OKAY = 2'b00, RESP_SLVERR = 2'b10;

  if (N_LOADS != 2) begin : g_bad_loads
    $error("axil_regs: the register map holds exactly two loads");
  end

  logic [31:0] ctrl, ftw0, ftw1;
  logic        wr_go, rd_go;

  assign wr_go = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign rd_go = s_axil_arvalid && !s_axil_rvalid;
  assign s_axil_awready = wr_go;
  assign s_axil_wready  = wr_go;
  assign s_axil_arready = rd_go;

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d,
                                        input logic [3:0] strb);
    logic [31:0] r = old;
    for (int b = 0; b < 4; b++) if (strb[b]) r[8*b +: 8] = d[8*b +: 8];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl          <= '0;
      ftw0          <= 32'(FTW_RESET);
      ftw1          <= 32'(FTW_RESET);
      s_axil_bvalid <= 1'b0;
      s_axil_bresp  <= RESP_OKAY;
      s_axil_rvalid <= 1'b0;
      s_axil_rresp  <= RESP_OKAY;
      s_axil_rdata  <= '0;
    end else begin
      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (wr_go) begin
        s_axil_bvalid <= 1'b1;
        s_axil_bresp  <= RESP_OKAY;
        unique case (s_axil_awaddr[5:2])
          4'h0: ctrl <= merge(ctrl, s_axil_wdata, s_axil_wstrb) & 32'h3F;
          4'h1: ftw0 <= merge(ftw0, s_axil_wdata, s_axil_wstrb) & 32'h01FF_FFFF;
          4'h2: ftw1 <= merge(ftw1, s_axil_wdata, s_axil_wstrb) & 32'h01FF_FFFF;
          4'h3, 4'h4: ;   // read-only, write ignored
          default: s_axil_bresp <= RESP_SLVERR;
        endcase
      end
      if (s_axil_rvalid && s_axil_rready) s_axil_rvalid <= 1'b0;
      if (rd_go) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rresp  <= RESP_OKAY;
        unique case (s_axil_araddr[5:2])
          4'h0: s_axil_rdata <= ctrl;
          4'h1: s_axil_rdata <= ftw0;
          4'h2: s_axil_rdata <= ftw1;
          4'h3: s_axil_rdata <= ovf_cnt_i;
          4'h4: s_axil_rdata <= {16'h4C49, 8'(N_LOADS), 8'(ADC_BITS)};
          default: begin
            s_axil_rdata <= '0;
            s_axil_rresp <= RESP_SLVERR;
          end
        endcase
      end
    end
  end

  assign mod_en_o    = ctrl[N_LOADS-1:0];
  assign adc_en_o    = ctrl[2];
  assign stream_en_o = ctrl[3];
  assign vmode_o[0]  = vmode_e'(ctrl[4]);
  assign vmode_o[1]  = vmode_e'(ctrl[5]);
  assign ftw_o[0]    = ftw0[PHASE_BITS-1:0];
  assign ftw_o[1]    = ftw1[PHASE_BITS-1:0];

  // AXI4-Lite: responses stay valid until accepted.
  assert property (@(posedge clk) disable iff (rst)
                   (s_axil_bvalid && !s_axil_bready) |=> s_axil_bvalid)
    else $error("axil_regs: BVALID dropped before BREADY");
  assert property (@(posedge clk) disable iff (rst)
                   (s_axil_rvalid && !s_axil_rready) |=> (s_axil_rvalid && $stable(s_axil_rdata)))
    else $error("axil_regs: read data changed before RREADY");
endmodule
