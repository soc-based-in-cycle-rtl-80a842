// tb_adc_spi_ctrl: six converter models share chip select and clock; random
// codes are presented to them and the words delivered by the SPI master are
// compared with the codes present at each chip-select falling edge. Checks
// the 36-clock sample period and that the data arrive before the next
// sampling instant.
module tb_adc_spi_ctrl;
  localparam int N = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enable = 0, cs_n, sck, sample, valid;
  logic [N-1:0] sdo;
  logic [11:0] data [N];
  logic [11:0] code [N];
  logic [11:0] at_sample [N];

  adc_spi_ctrl #(.N_CH(N)) dut (.clk, .rst, .enable_i(enable), .cs_n_o(cs_n), .sck_o(sck),
                                .sdo_i(sdo), .sample_o(sample), .valid_o(valid), .data_o(data));

  for (genvar c = 0; c < N; c++) begin : g_adc
    ltc2315_model u_adc (.cs_n, .sck, .code_i(code[c]), .sdo(sdo[c]));
  end

  // new random analog values every clock
  always @(negedge clk) for (int c = 0; c < N; c++) code[c] = 12'($urandom);
  always @(negedge cs_n) at_sample = code;

  int cyc = 0, last_sample = -1, last_valid = -1, nvalid = 0;
  always @(posedge clk) begin
    cyc++;
    if (sample && cyc > 3) begin
      if (last_sample >= 0) begin
        checks++;
        if (cyc - last_sample != 36) begin failures++; $display("sample period %0d", cyc - last_sample); end
      end
      last_sample = cyc;
    end
    if (valid && cyc > 3) begin
      nvalid++;
      checks++;
      if (cyc - last_sample >= 36) failures++;
      for (int c = 0; c < N; c++) begin
        checks++;
        if (data[c] !== at_sample[c]) begin
          failures++;
          if (failures < 10) $display("cyc %0d ch %0d got %h exp %h", cyc, c, data[c], at_sample[c]);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    enable <= 1;
    repeat (36 * 200) @(posedge clk);
    checks++;
    if (nvalid < 199) failures++;
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
