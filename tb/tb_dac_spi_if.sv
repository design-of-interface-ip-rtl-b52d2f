// tb_dac_spi_if: checks dac_spi_if against the LTC2664 model.
//
// Random channel codes and channel-enable masks are sent with the
// write-and-update command; afterwards the model's DAC registers must hold
// the codes of the enabled channels and the old codes elsewhere, the
// number of 24-bit frames must equal the number of enabled channels, no
// frame may have a wrong length, channels must arrive in order 0..3, and
// the sequence must take (48*SCK_HALF + CS_GAP + 1) clocks per frame.
// One pass uses the power-down command.
module tb_dac_spi_if
  import aio_pkg::*;
;
  localparam int SCK_HALF = 2;
  localparam int CS_GAP   = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done, cs_n, sck, sdi;
  dac_cmd_e cmd = DAC_CMD_WRITE_UPDATE;
  logic [3:0] ch_en = '0;
  logic [15:0] ch_data [4];
  logic [15:0] in_reg [4], dac_reg [4];
  logic [3:0] pd;
  int frames, bad_frames;
  logic [23:0] last_frame;
  int checks = 0, failures = 0;

  dac_spi_if #(.SCK_HALF(SCK_HALF), .CS_GAP(CS_GAP)) dut (
    .clk, .rst_n, .start, .cmd, .ch_en, .ch_data, .busy, .done, .cs_n, .sck, .sdi);
  ltc2664_model dac (.cs_n, .sck, .sdi, .in_reg, .dac_reg, .powered_down(pd),
                     .frames, .bad_frames, .last_frame);

  // Channel order seen on the wire.
  int order [$];
  always @(posedge cs_n) if (dac.nbits == 24) order.push_back(int'(dac.sh[19:16]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] model_reg [4];
    for (int i = 0; i < 4; i++) begin ch_data[i] = '0; model_reg[i] = 16'h8000; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      int f0, nen, t0, lat;
      for (int i = 0; i < 4; i++) ch_data[i] = 16'($urandom);
      ch_en = (n < 2) ? 4'hF : 4'($urandom);
      nen = $countones(ch_en);
      f0 = frames;
      order.delete();
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      t0 = $time;
      while (!done) @(negedge clk);
      lat = int'(($time - t0) / 10) + 1;
      @(negedge clk);
      for (int i = 0; i < 4; i++) if (ch_en[i]) model_reg[i] = ch_data[i];
      check(frames - f0 == nen, $sformatf("pass %0d: %0d frames for %0d channels", n, frames - f0, nen));
      for (int i = 0; i < 4; i++)
        check(dac_reg[i] == model_reg[i], $sformatf("pass %0d ch %0d: %h want %h", n, i, dac_reg[i], model_reg[i]));
      for (int k = 1; k < order.size(); k++) check(order[k] > order[k-1], "channels in ascending order");
      if (nen == 4)
        check(lat >= 4*(48*SCK_HALF + CS_GAP + 1) && lat <= 4*(48*SCK_HALF + CS_GAP + 1) + 2,
              $sformatf("4-frame sequence took %0d clocks", lat));
    end
    // Power down channel 2 only.
    cmd = DAC_CMD_POWER_DOWN;
    ch_en = 4'b0100;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    check(pd == 4'b0100, "power-down command reaches channel 2");
    check(last_frame[23:16] == 8'h42, "power-down frame header 0100_0010");
    check(bad_frames == 0, "no frame of wrong length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
