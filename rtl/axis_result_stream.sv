// axis_result_stream: AXI4-Stream source for the identification results.
//
// Each time the detectors deliver a result set (valid_i), one frame of
// 5 * N_LOADS 32-bit words is queued: for load 0, 1, ... in turn the words
// vc, vs, ic, is and the load's switching-frequency tuning word
// (f_sw = ftw * f_clk / 2**25). tlast marks the last word of a frame. A DMA
// engine writes the frames to memory, where software computes R and L.
//
// The frame is taken into a holding register and copied into a FIFO of DEPTH
// words at one word per clock; the FIFO feeds the stream. A frame is only
// accepted when the FIFO has room for all of it, so frames are never torn:
// when the sink holds tready low for too long, whole frames are dropped,
// ovf_cnt_o counts them and ovf_o stays set until reset. While enable_i is
// low, results are discarded and not counted.
//
// Timing: the first word of a frame can be on the stream two clocks after
// valid_i; a frame needs 5 * N_LOADS clocks to enter the FIFO, far less than
// the 1152 clocks between result sets at the system rates.
//
// From the source design: the transferred quantities (four PSD components and
// the switching frequency per load) and the AXI4-Stream link to a DMA. This
// design's own choices: word order, framing, FIFO depth and the drop policy.
module axis_result_stream
  import lid_pkg::*;
#(
  parameter int unsigned N_LOADS = 2,
  parameter int unsigned DEPTH   = 32
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               enable_i,
  input  logic               valid_i,
  input  psd_result_t        res_i [N_LOADS],
  input  logic [PHASE_BITS-1:0] ftw_i [N_LOADS],
  output logic [31:0]        m_axis_tdata,
  output logic               m_axis_tvalid,
  input  logic               m_axis_tready,
  output logic               m_axis_tlast,
  output logic               ovf_o,
  output logic [31:0]        ovf_cnt_o
);
  localparam int unsigned FRAME = 5 * N_LOADS;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned FW    = $clog2(FRAME + 1);

  if (DEPTH < FRAME || (1 << AW) != DEPTH) begin : g_bad_depth
    $error("axis_result_stream: DEPTH must be a power of two holding a frame");
  end

  logic [31:0]   frame [FRAME];
  logic [FW-1:0] left;          // words of the held frame still to queue
  logic [FW-1:0] widx;

  logic [32:0]   mem [DEPTH];   // {tlast, tdata}
  logic [AW:0]   wptr, rptr;
  logic [AW:0]   used;
  logic          push, pop;

  assign used = wptr - rptr;
  assign push = (left != '0);
  assign pop  = m_axis_tvalid && m_axis_tready;

  always_ff @(posedge clk) begin
    if (rst) begin
      left      <= '0;
      widx      <= '0;
      wptr      <= '0;
      rptr      <= '0;
      ovf_o     <= 1'b0;
      ovf_cnt_o <= '0;
    end else begin
      if (valid_i && enable_i) begin
        if (left == '0 && (int'(used) + int'(FRAME) <= int'(DEPTH))) begin
          for (int l = 0; l < int'(N_LOADS); l++) begin
            frame[5*l+0] <= res_i[l].vc;
            frame[5*l+1] <= res_i[l].vs;
            frame[5*l+2] <= res_i[l].ic;
            frame[5*l+3] <= res_i[l].is;
            frame[5*l+4] <= 32'(ftw_i[l]);
          end
          left <= FW'(FRAME);
          widx <= '0;
        end else begin
          ovf_o     <= 1'b1;
          ovf_cnt_o <= ovf_cnt_o + 1'b1;
        end
      end
      if (push) begin
        mem[wptr[AW-1:0]] <= {(left == FW'(1)), frame[widx]};
        wptr <= wptr + 1'b1;
        widx <= widx + 1'b1;
        left <= left - 1'b1;
      end
      if (pop) rptr <= rptr + 1'b1;
    end
  end

  assign m_axis_tvalid = (used != '0);
  assign {m_axis_tlast, m_axis_tdata} = mem[rptr[AW-1:0]];

  // AXI4-Stream: once offered, a word stays offered and unchanged until taken.
  assert property (@(posedge clk) disable iff (rst)
                   (m_axis_tvalid && !m_axis_tready) |=> (m_axis_tvalid && $stable(m_axis_tdata)
                                                          && $stable(m_axis_tlast)))
    else $error("axis_result_stream: stream word changed before it was taken");
  assert property (@(posedge clk) disable iff (rst) (used <= (AW+1)'(DEPTH)))
    else $error("axis_result_stream: FIFO overrun");
endmodule
