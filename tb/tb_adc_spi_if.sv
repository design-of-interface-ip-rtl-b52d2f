// tb_adc_spi_if: checks adc_spi_if against the LTC2328 model.
//
// Forty conversions of random codes (plus full-scale and zero codes); each
// result must equal the model's input code, valid must pulse exactly once
// per conversion, and a conversion must take the expected number of clocks:
// BUSY time (which starts with CNV) + 3 synchroniser/handoff clocks +
// 31*SCK_HALF.
module tb_adc_spi_if;
  localparam int CNV_CYCLES = 4;
  localparam int SCK_HALF   = 2;
  localparam int CONV_CLKS  = 50;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, valid, cnv, adc_busy, sck, sdo;
  logic [15:0] data;
  logic signed [15:0] code = 0;
  int conversions;
  int checks = 0, failures = 0;

  adc_spi_if #(.DATA_W(16), .CNV_CYCLES(CNV_CYCLES), .SCK_HALF(SCK_HALF)) dut (
    .clk, .rst_n, .start, .busy, .data, .valid, .cnv, .adc_busy, .sck, .sdo);

  ltc2328_model #(.CONV_CLKS(CONV_CLKS)) adc (
    .clk, .code, .cnv, .busy(adc_busy), .sck, .sdo, .conversions);

  int valid_count = 0;
  always @(posedge clk) if (valid) valid_count++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Expected length from the start pulse to valid, counted in clocks.
  // The model's BUSY rises with CNV and lasts CONV_CLKS clocks (longer
  // than CNV_CYCLES), then 3 clocks of synchroniser and state handoff, then
  // 16 low and 15 high SCK phases of SCK_HALF clocks.
  localparam int EXPECTED = CONV_CLKS + 3 + 31*SCK_HALF;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      int vbefore;
      code = (n == 0) ? 16'sh7FFF : (n == 1) ? -16'sd32768 : (n == 2) ? 16'sd0 : 16'($urandom);
      vbefore = valid_count;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      t0 = $time;
      while (!valid) @(negedge clk);
      lat = int'(($time - t0) / 10) + 1;
      check(data == code, $sformatf("conversion %0d: got %h want %h", n, data, code));
      @(negedge clk);
      check(valid_count == vbefore + 1, "one valid pulse per conversion");
      if (n == 0) $display("conversion latency %0d clocks (expected %0d)", lat, EXPECTED);
      check(lat >= EXPECTED - 1 && lat <= EXPECTED + 1,
            $sformatf("latency %0d clocks, expected %0d", lat, EXPECTED));
      check(!busy, "interface idle after valid");
    end
    check(conversions == 40, "model saw 40 conversions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
