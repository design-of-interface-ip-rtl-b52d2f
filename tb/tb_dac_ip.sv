// tb_dac_ip: checks dac_ip with the waveform ROM and three LTC2664 models.
//
// Mode 1 runs for one full table period (1000 update rounds): after every
// round each channel of chips 0 and 1 must hold
// 32768 + 32767*sin(2*pi*(start+round)/1000)*amp/256 (computed here with
// real arithmetic, tolerance 60 LSB), the round period must be SAMPLE_DIV
// clocks (100 Hz output at a 100 MHz clock), and the peak-to-peak voltages
// of channels 0 and 1 (+/-10 V span) must match 7.2 V and 18.0 V within
// 0.1 V. Mode 2 is checked for some rounds, then self-test mode (every
// enabled channel carries the self-test data), a TEMP value on chip 2
// channel 0 while chip 2 is disabled, and mode 0 (chips 0 and 1 silent).
module tb_dac_ip
  import aio_pkg::*;
;
  localparam int SAMPLE_DIV = 1000;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic rom_en;
  logic [WAVE_AW-1:0] rom_addr;
  logic signed [15:0] rom_dout;
  logic [2:0] cs_n, sck, sdi;
  logic round_tick;
  logic [15:0] in_reg [3][4], dac_reg [3][4];
  int frames [3], bad [3];
  int checks = 0, failures = 0;

  dac_ip #(.SAMPLE_DIV(SAMPLE_DIV)) dut (
    .clk, .rst_n, .s_axi_req(req), .s_axi_rsp(rsp), .rom_en, .rom_addr, .rom_dout,
    .dac_cs_n(cs_n), .dac_sck(sck), .dac_sdi(sdi), .round_tick);
  wave_rom #(.DEPTH(1000)) rom (.clk, .en(rom_en), .addr(rom_addr), .dout(rom_dout));
  axil_bfm bfm (.clk, .req, .rsp);

  for (genvar d = 0; d < 3; d++) begin : g_dac
    ltc2664_model m (.cs_n(cs_n[d]), .sck(sck[d]), .sdi(sdi[d]), .in_reg(in_reg[d]),
                     .dac_reg(dac_reg[d]), .powered_down(), .frames(frames[d]),
                     .bad_frames(bad[d]), .last_frame());
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference: channel settings of the two modes (start, amp).
  function automatic int expected(input int start, input int amp, input int r);
    real s = 32767.0 * $sin(2.0 * PI * ((start + r) % 1000) / 1000.0);
    return 32768 + int'($floor(s * amp / 256.0));
  endfunction

  // Wait for the next round and for its frames to finish.
  task automatic next_round();
    @(posedge round_tick);
    repeat (4 * (48 * 2 + 4 + 1) + 10) @(posedge clk);
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int period_bad = 0, period_seen = 0;
  initial begin
    longint last = -1;
    forever begin
      @(posedge round_tick);
      if (last >= 0) begin
        period_seen++;
        if (($time - last) / 10 != SAMPLE_DIV) period_bad++;
      end
      last = $time;
    end
  end

  initial begin
    int st [4], am [4];
    int mn [2], mx [2];
    int f2;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- mode 1, chips 0 and 1, one full period
    st = '{0, 811, 0, 811};  am = '{92, 230, 92, 230};
    mn = '{65535, 65535};  mx = '{0, 0};
    @(posedge round_tick);
    bfm.write(12'h0, {16'h0, 5'd1, 11'b011});
    for (int r = 0; r < 1000; r++) begin
      next_round();
      for (int d = 0; d < 2; d++)
        for (int c = 0; c < 4; c++) begin
          automatic int e = expected(st[c], am[c], r);
          automatic int g = int'(dac_reg[d][c]);
          if (r < 20 || (r % 50) == 0 || (g - e > 60) || (e - g > 60))
            check(g - e <= 60 && e - g <= 60,
                  $sformatf("mode 1 round %0d chip %0d ch %0d: %0d want %0d", r, d, c, g, e));
        end
      for (int c = 0; c < 2; c++) begin
        if (int'(dac_reg[0][c]) < mn[c]) mn[c] = int'(dac_reg[0][c]);
        if (int'(dac_reg[0][c]) > mx[c]) mx[c] = int'(dac_reg[0][c]);
      end
    end
    begin
      automatic real vpp0 = (mx[0] - mn[0]) * 20.0 / 65536.0;
      automatic real vpp1 = (mx[1] - mn[1]) * 20.0 / 65536.0;
      $display("mode 1 peak-to-peak: ch0 %0.2f V, ch1 %0.2f V", vpp0, vpp1);
      check(vpp0 > 7.1 && vpp0 < 7.3, "mode 1 ch0 7.2 Vpp");
      check(vpp1 > 17.9 && vpp1 < 18.1, "mode 1 ch1 18.0 Vpp");
    end
    check(period_seen > 900 && period_bad == 0, "one update round every SAMPLE_DIV clocks");
    check(frames[2] == 0, "chip 2 disabled: no frames");

    // ---------------- mode 2
    st = '{0, 250, 0, 250};  am = '{38, 92, 38, 92};
    @(posedge round_tick);
    bfm.write(12'h0, {16'h0, 5'd2, 11'b011});
    for (int r = 0; r < 30; r++) begin
      next_round();
      for (int c = 0; c < 4; c++) begin
        automatic int e = expected(st[c], am[c], r);
        automatic int g = int'(dac_reg[1][c]);
        check(g - e <= 60 && e - g <= 60, $sformatf("mode 2 round %0d ch %0d: %0d want %0d", r, c, g, e));
      end
    end

    // ---------------- self-test mode, all three chips
    bfm.write(12'h0, {16'hA5C3, 5'd31, 11'b111});
    next_round(); next_round();
    for (int d = 0; d < 3; d++)
      for (int c = 0; c < 4; c++)
        check(dac_reg[d][c] == 16'hA5C3, $sformatf("self-test chip %0d ch %0d: %h", d, c, dac_reg[d][c]));

    // ---------------- TEMP on chip 2 channel 0, chip 2 disabled, mode 0
    bfm.write(12'h0, {16'h0, 5'd0, 11'b000});
    bfm.write(12'h4, 32'h0001_1234);
    next_round(); next_round();
    f2 = frames[2];
    begin
      automatic int f0 = frames[0];
      next_round();
      check(frames[0] == f0, "mode 0: chip 0 silent");
    end
    check(frames[2] == f2 + 1, "only the TEMP channel is sent on chip 2");
    check(dac_reg[2][0] == 16'h1234, $sformatf("TEMP output %h", dac_reg[2][0]));
    check(dac_reg[2][1] == 16'hA5C3, "chip 2 channel 1 keeps its last code");
    bfm.write(12'h8, 32'h0001_2222);
    bfm.write(12'hC, 32'h0001_3333);
    next_round(); next_round();
    check(dac_reg[2][1] == 16'h2222 && dac_reg[2][2] == 16'h3333, "GAS and AIR QUALITY outputs");
    for (int d = 0; d < 3; d++) check(bad[d] == 0, "no frame of wrong length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
