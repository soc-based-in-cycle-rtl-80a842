// tb_tdm_serializer: presents random sets of four words at random spacings
// (never closer than four clocks) and checks that each set leaves as four
// consecutive transfers, channels 0 to 3 in order, starting the clock after
// it was presented, with the words unchanged, and that nothing leaves
// between sets.
module tb_tdm_serializer;
  localparam int NCH = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic valid_i = 0, valid_o;
  logic [30:0] x [NCH];
  logic [1:0]  ch_o;
  logic [30:0] y;

  tdm_serializer #(.W(31), .NCH(NCH)) dut (.clk, .rst, .valid_i, .x_i(x), .valid_o, .ch_o, .y_o(y));

  logic [30:0] exp_w [NCH];
  int left = 0, idx = 0, nsets = 0;

  always @(posedge clk) if (!rst) begin
    checks++;
    if (left > 0) begin
      if (!valid_o || int'(ch_o) != idx || y != exp_w[idx]) begin
        failures++;
        if (failures < 10) $display("set %0d word %0d: valid %0d ch %0d data %h exp %h",
                                    nsets, idx, valid_o, ch_o, y, exp_w[idx]);
      end
      idx++;
      left--;
    end else if (valid_o) failures++;
    if (valid_i) begin
      exp_w = x;
      idx   = 0;
      left  = NCH;
      nsets++;
    end
  end

  initial begin
    for (int c = 0; c < NCH; c++) x[c] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 2000; n++) begin
      repeat (NCH - 1 + $urandom_range(0, 6)) @(negedge clk);
      for (int c = 0; c < NCH; c++) x[c] = 31'($urandom);
      valid_i = 1;
      @(negedge clk) valid_i = 0;
    end
    repeat (10) @(posedge clk);
    checks++;
    if (nsets != 2000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
