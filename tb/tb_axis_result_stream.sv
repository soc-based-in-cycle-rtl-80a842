// tb_axis_result_stream: result sets with random contents are offered every
// 60 clocks while the sink takes words with a random tready. Every frame read
// from the stream is compared word by word (order vc, vs, ic, is, ftw for
// load 0 then load 1, tlast on the 10th word) with a queue of the accepted
// sets. Then the sink stalls so that the FIFO fills: frames must be dropped
// whole and counted, and the stream must still deliver complete, correct
// frames afterwards. Results offered while disabled must be ignored.
module tb_axis_result_stream;
  import lid_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enable = 0, valid_i = 0, tvalid, tready = 0, tlast, ovf;
  psd_result_t res [2];
  logic [24:0] ftw [2];
  logic [31:0] tdata, ovf_cnt;

  axis_result_stream dut (.clk, .rst, .enable_i(enable), .valid_i, .res_i(res), .ftw_i(ftw),
                          .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready),
                          .m_axis_tlast(tlast), .ovf_o(ovf), .ovf_cnt_o(ovf_cnt));

  logic [31:0] expq [$];
  int words = 0, frames = 0, sent = 0;
  bit random_ready = 1;

  always @(posedge clk) begin
    if (tvalid && tready) begin
      logic [31:0] e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected word"); end
      else begin
        e = expq.pop_front();
        if (tdata != e) begin failures++; if (failures < 10) $display("word %0d: %h exp %h", words, tdata, e); end
      end
      words++;
      checks++;
      if (tlast != (words % 10 == 0)) begin failures++; $display("tlast at word %0d", words); end
      if (tlast) frames++;
    end
  end
  always @(negedge clk) tready = random_ready ? ($urandom_range(0, 3) != 0) : 1'b0;

  // Offer one set; 'accept' says whether the model expects it to be queued.
  task automatic offer(input bit accept);
    @(negedge clk);
    for (int l = 0; l < 2; l++) begin
      res[l] = {$urandom, $urandom, $urandom, $urandom};
      ftw[l] = 25'($urandom);
    end
    valid_i = 1;
    if (accept) begin
      for (int l = 0; l < 2; l++) begin
        expq.push_back(res[l].vc); expq.push_back(res[l].vs);
        expq.push_back(res[l].ic); expq.push_back(res[l].is);
        expq.push_back(32'(ftw[l]));
      end
      sent++;
    end
    @(negedge clk) valid_i = 0;
    repeat (58) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    offer(0);                       // disabled: ignored, not counted
    enable = 1;
    for (int n = 0; n < 50; n++) offer(1);
    // stall: FIFO of 32 words takes 3 frames, the rest are dropped
    repeat (200) @(posedge clk);
    random_ready = 0;
    repeat (20) @(posedge clk);
    for (int n = 0; n < 8; n++) offer(n < 3);
    checks++;
    if (!ovf || ovf_cnt != 5) begin failures++; $display("ovf %b count %0d", ovf, ovf_cnt); end
    random_ready = 1;
    repeat (100) @(posedge clk);
    for (int n = 0; n < 10; n++) offer(1);
    repeat (300) @(posedge clk);
    checks++;
    if (frames != sent || expq.size() != 0) begin
      failures++; $display("frames %0d sent %0d left %0d", frames, sent, expq.size());
    end
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
