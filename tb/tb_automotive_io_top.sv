// tb_automotive_io_top: end-to-end test of automotive_io_top at its default
// parameters (1000-sample ADC runs, 1000-clock DAC update rounds), with the
// control board modelled around it: two LTC2328 ADCs and three LTC2664
// DACs on the main IPs, two more of each on the self-test IP, and four 4:1
// analog muxes driven by the self-test IP's 20 select/enable lines. As in
// the self-test arrangement, the DAC IP's chips 0 and 1 reach the
// self-test ADCs through muxes 0 and 1, and the self-test DACs reach the
// ADC IP's converters through muxes 2 and 3. With mux 2 or 3 disabled, the
// ADC IP's input is a bench supply voltage set by the test.
//
// Steps: ADC voltage sweep 0..10 V and 10.5 V in run mode 2 (one sample,
// compared with 3200 codes per volt, saturating at 32767); run mode 1 on
// both ADCs at once (1000 samples each, checked sample by sample and
// averaged); DAC IP waveform modes 1 and 2; DAC IP self-test data read back
// by the self-test ADCs; self-test DAC data read back by the ADC IP;
// TEMP/GAS/AIR QUALITY outputs; DI/O edge and press-time interrupts and
// outputs. Each mechanism is counted and must have happened at least once.
module tb_automotive_io_top
  import aio_pkg::*;
;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t adc_req, dac_req, dio_req, st_req;
  axil_rsp_t adc_rsp, dac_rsp, dio_rsp, st_rsp;
  logic adc_irq, dio_irq;
  logic bram_b_en = 0;
  logic [9:0] bram_b_addr = 0;
  logic [31:0] bram_b_dout;
  logic [1:0] adc_cnv, adc_busy, adc_sck, adc_sdo;
  logic [2:0] dac_cs_n, dac_sck, dac_sdi;
  logic [9:0] dio_in = '0;
  logic [7:0] dio_out;
  logic [19:0] st_mux_sel;
  logic [1:0] st_adc_cnv, st_adc_busy, st_adc_sck, st_adc_sdo;
  logic [1:0] st_dac_cs_n, st_dac_sck, st_dac_sdi;
  int checks = 0, failures = 0;

  automotive_io_top dut (
    .clk, .rst_n,
    .adc_axi_req(adc_req), .adc_axi_rsp(adc_rsp), .dac_axi_req(dac_req), .dac_axi_rsp(dac_rsp),
    .dio_axi_req(dio_req), .dio_axi_rsp(dio_rsp), .st_axi_req(st_req), .st_axi_rsp(st_rsp),
    .adc_irq, .dio_irq,
    .bram_b_en, .bram_b_we(4'h0), .bram_b_addr, .bram_b_din(32'h0), .bram_b_dout,
    .adc_cnv, .adc_busy, .adc_sck, .adc_sdo,
    .dac_cs_n, .dac_sck, .dac_sdi,
    .dio_in, .dio_out,
    .st_mux_sel, .st_adc_cnv, .st_adc_busy, .st_adc_sck, .st_adc_sdo,
    .st_dac_cs_n, .st_dac_sck, .st_dac_sdi);

  axil_bfm adc_bfm (.clk, .req(adc_req), .rsp(adc_rsp));
  axil_bfm dac_bfm (.clk, .req(dac_req), .rsp(dac_rsp));
  axil_bfm dio_bfm (.clk, .req(dio_req), .rsp(dio_rsp));
  axil_bfm st_bfm  (.clk, .req(st_req),  .rsp(st_rsp));

  // ------------------------------------------------------------ the board
  function automatic real dac_volts(input logic [15:0] c);
    return (real'(int'(c)) - 32768.0) / 32768.0 * 10.0;   // +/-10 V span
  endfunction
  function automatic logic signed [15:0] adc_code(input real v);
    real x = v * 3200.0;                                   // +/-10.24 V range
    if (x > 32767.0) return 16'sh7FFF;
    if (x < -32768.0) return -16'sd32768;
    return 16'($rtoi(x >= 0 ? x + 0.5 : x - 0.5));
  endfunction

  logic [15:0] m_in [3][4], m_dac [3][4];      // DAC IP chips
  logic [15:0] s_in [2][4], s_dac [2][4];      // self-test DAC chips
  int m_frames [3], m_bad [3], s_frames [2], s_bad [2];
  int m_conv [2], s_conv [2];
  real psu [2];                                // bench supply on ADC IP inputs
  logic signed [15:0] m_code [2], s_code [2];

  for (genvar d = 0; d < 3; d++) begin : g_mdac
    ltc2664_model m (.cs_n(dac_cs_n[d]), .sck(dac_sck[d]), .sdi(dac_sdi[d]), .in_reg(m_in[d]),
                     .dac_reg(m_dac[d]), .powered_down(), .frames(m_frames[d]),
                     .bad_frames(m_bad[d]), .last_frame());
  end
  for (genvar k = 0; k < 2; k++) begin : g_board
    ltc2664_model sd (.cs_n(st_dac_cs_n[k]), .sck(st_dac_sck[k]), .sdi(st_dac_sdi[k]),
                      .in_reg(s_in[k]), .dac_reg(s_dac[k]), .powered_down(),
                      .frames(s_frames[k]), .bad_frames(s_bad[k]), .last_frame());
    // Mux k (bits 5k+4:5k) routes DAC IP chip k to self-test ADC k.
    // Mux 2+k routes self-test DAC k to ADC IP converter k.
    always_comb begin
      automatic logic [4:0] ms = st_mux_sel[5*k +: 5];
      automatic logic [4:0] ma = st_mux_sel[5*(k+2) +: 5];
      automatic real vs = 0.0, va = psu[k];
      for (int c = 0; c < 4; c++) begin
        if (ms[4] && ms[c]) vs = dac_volts(m_dac[k][c]);
        if (ma[4] && ma[c]) va = dac_volts(s_dac[k][c]);
      end
      s_code[k] = adc_code(vs);
      m_code[k] = adc_code(va);
    end
    ltc2328_model sa (.clk, .code(s_code[k]), .cnv(st_adc_cnv[k]), .busy(st_adc_busy[k]),
                      .sck(st_adc_sck[k]), .sdo(st_adc_sdo[k]), .conversions(s_conv[k]));
    ltc2328_model ma (.clk, .code(m_code[k]), .cnv(adc_cnv[k]), .busy(adc_busy[k]),
                      .sck(adc_sck[k]), .sdo(adc_sdo[k]), .conversions(m_conv[k]));
  end

  // ------------------------------------------------------- bookkeeping
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef enum int {
    M_ADC_SINGLE, M_ADC_MULTI, M_BRAM_CONFLICT, M_ADC_IRQ, M_DAC_MODE1, M_DAC_MODE2,
    M_DAC_SELFTEST, M_DAC_STATIC, M_DIO_EDGE_IRQ, M_DIO_COUNT_IRQ, M_DIO_OUT,
    M_ST_ADC_RUN, M_ST_DAC_RUN, M_MUX_ROUTE, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"ADC run mode 2 (single)", "ADC run mode 1 (1000 samples)",
    "BRAM port contention", "ADC interrupt", "DAC mode 1 rounds", "DAC mode 2 rounds",
    "DAC self-test rounds", "TEMP/GAS/AIR QUALITY output", "DI/O edge interrupt",
    "DI/O press-time interrupt", "DI/O output", "self-test ADC run", "self-test DAC run",
    "board mux routing"};

  always @(posedge clk) begin
    if (dut.u_adc_ip.st[0] == 2'd2 && dut.u_adc_ip.st[1] == 2'd2) mech[M_BRAM_CONFLICT]++;
    if (dut.u_dac_ip.round_tick) begin
      if (dut.u_dac_ip.mode == DAC_MODE_1) mech[M_DAC_MODE1]++;
      if (dut.u_dac_ip.mode == DAC_MODE_2) mech[M_DAC_MODE2]++;
      if (dut.u_dac_ip.mode == DAC_MODE_SELFTEST) mech[M_DAC_SELFTEST]++;
    end
  end
  always @(posedge adc_irq) mech[M_ADC_IRQ]++;

  task automatic bram_read(input int a, output logic [31:0] d);
    @(negedge clk); bram_b_en = 1; bram_b_addr = 10'(a);
    @(negedge clk); bram_b_en = 0;
    d = bram_b_dout;
  endtask

  // Start ADC IP run(s), wait for COMPLETE, clear it.
  task automatic adc_run(input logic [3:0] modes);
    logic [31:0] d;
    logic [1:0] want;
    want = {modes[3:2] != 0, modes[1:0] != 0};
    adc_bfm.write(12'h0, {28'h0, modes});
    do begin
      while (!adc_irq) @(posedge clk);
      adc_bfm.read(12'h0, d);
    end while ((d[9:8] & want) != want);
    adc_bfm.write(12'h0, 32'h0);
    check(!adc_irq, "ADC interrupt cleared");
  endtask

  // Waveform reference of the DAC IP (table entry * amp / 256 around mid-scale).
  function automatic int wave_ref(input int start, input int amp, input int r);
    real s = 32767.0 * $sin(2.0 * PI * ((start + r) % 1000) / 1000.0);
    return 32768 + int'($floor(s * amp / 256.0));
  endfunction

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    real volts [12] = '{0.0, 1.0, 2.0, 3.0, 4.0, 5.0, 6.0, 7.0, 8.0, 9.0, 10.0, 10.5};
    int calc [12] = '{0, 3200, 6400, 9600, 12800, 16000, 19199, 22399, 25599, 28799, 31999, 32767};
    psu[0] = 0.0; psu[1] = 0.0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // ------------------------------------------ ADC: voltage sweep, mode 2
    for (int i = 0; i < 12; i++) begin
      automatic int got;
      psu[0] = volts[i];
      adc_run(4'b0010);
      mech[M_ADC_SINGLE]++;
      bram_read(0, d);
      got = int'($signed(d[15:0]));
      $display("ADC %5.2f V: %0d (calculated %0d)", volts[i], got, calc[i]);
      check(got - calc[i] <= 1 && calc[i] - got <= 1,
            $sformatf("ADC at %0.1f V: %0d, calculated %0d", volts[i], got, calc[i]));
    end

    // ------------------------------- ADC: mode 1 on both converters at once
    begin
      automatic longint sum = 0;
      automatic int t0;
      psu[0] = 5.0;  psu[1] = -3.0;
      t0 = $time;
      adc_run(4'b0101);
      mech[M_ADC_MULTI]++;
      $display("two 1000-sample runs: %0d clocks", ($time - t0) / 10);
      for (int a = 0; a < 1000; a++) begin
        bram_read(a, d);
        sum += int'($signed(d[15:0]));
        if (a % 97 == 0 || $signed(d[15:0]) != 16000 || $signed(d[31:16]) != -9600)
          check($signed(d[15:0]) == 16000 && $signed(d[31:16]) == -9600,
                $sformatf("sample %0d: %0d / %0d", a, $signed(d[15:0]), $signed(d[31:16])));
      end
      check(sum / 1000 == 16000, $sformatf("1000-sample average %0d", sum / 1000));
    end

    // ---------------------------------------------------- DAC: mode 1, 2
    begin
      automatic int st1 [4] = '{0, 811, 0, 811}, am1 [4] = '{92, 230, 92, 230};
      automatic int st2 [4] = '{0, 250, 0, 250}, am2 [4] = '{38, 92, 38, 92};
      @(posedge dut.u_dac_ip.round_tick);
      dac_bfm.write(12'h0, {16'h0, 5'd1, 11'b011});
      for (int r = 0; r < 40; r++) begin
        @(posedge dut.u_dac_ip.round_tick);
        repeat (420) @(posedge clk);
        for (int c = 0; c < 4; c++) begin
          automatic int e = wave_ref(st1[c], am1[c], r);
          automatic int g = int'(m_dac[1][c]);
          check(g - e <= 60 && e - g <= 60, $sformatf("mode 1 round %0d ch %0d: %0d want %0d", r, c, g, e));
        end
      end
      // Route DAC IP chip 0 channel 1 to self-test ADC 0 and sample it.
      st_bfm.write(12'h0, {15'h0, 5'b1_0010});
      mech[M_MUX_ROUTE]++;
      st_bfm.write(12'h4, 32'h0001_0000);
      do st_bfm.read(12'h4, d); while (!d[17]);
      mech[M_ST_ADC_RUN]++;
      check($signed(d[15:0]) >= adc_code(-9.0) && $signed(d[15:0]) <= adc_code(9.0),
            $sformatf("mode 1 channel 1 seen by self-test ADC: %0d", $signed(d[15:0])));
      @(posedge dut.u_dac_ip.round_tick);
      dac_bfm.write(12'h0, {16'h0, 5'd2, 11'b011});
      for (int r = 0; r < 20; r++) begin
        @(posedge dut.u_dac_ip.round_tick);
        repeat (420) @(posedge clk);
        for (int c = 0; c < 4; c++) begin
          automatic int e = wave_ref(st2[c], am2[c], r);
          automatic int g = int'(m_dac[0][c]);
          check(g - e <= 60 && e - g <= 60, $sformatf("mode 2 round %0d ch %0d: %0d want %0d", r, c, g, e));
        end
      end
    end

    // --------------------- DAC IP self-test data -> mux -> self-test ADCs
    for (int n = 0; n < 4; n++) begin
      automatic logic [15:0] x = 16'h4000 + 16'(n * 5000);
      automatic logic [15:0] want = adc_code(dac_volts(x));
      dac_bfm.write(12'h0, {x, 5'd31, 11'b011});
      repeat (2) @(posedge dut.u_dac_ip.round_tick);
      repeat (420) @(posedge clk);
      // mux 0 -> chip 0 channel n, mux 1 -> chip 1 channel 3-n
      st_bfm.write(12'h0, {10'h0, 1'b1, 4'(1 << (3 - n)), 1'b1, 4'(1 << n)});
      mech[M_MUX_ROUTE]++;
      for (int k = 0; k < 2; k++) begin
        st_bfm.write(12'(4 + 4 * k), 32'h0001_0000);
        do st_bfm.read(12'(4 + 4 * k), d); while (!d[17]);
        mech[M_ST_ADC_RUN]++;
        check(d[15:0] == want, $sformatf("self-test ADC%0d read %h, DAC IP wrote %h (expect %h)",
                                         k, d[15:0], x, want));
      end
    end
    dac_bfm.write(12'h0, 32'h0);

    // --------------------- self-test DACs -> mux -> ADC IP converters
    for (int n = 0; n < 3; n++) begin
      automatic logic [15:0] y0 = 16'h2000 + 16'(n * 9000);
      automatic logic [15:0] y1 = 16'hF000 - 16'(n * 7000);
      st_bfm.write(12'hC, {15'h0, 1'b1, y0});
      st_bfm.write(12'h10, {15'h0, 1'b1, y1});
      do st_bfm.read(12'h10, d); while (d[16]);
      do st_bfm.read(12'hC, d); while (d[16]);
      mech[M_ST_DAC_RUN] += 2;
      // mux 2 -> self-test DAC 0 channel n, mux 3 -> self-test DAC 1 channel n+1
      st_bfm.write(12'h0, {1'b1, 4'(1 << (n + 1)), 1'b1, 4'(1 << n), 10'h0});
      mech[M_MUX_ROUTE]++;
      adc_run(4'b1010);
      mech[M_ADC_SINGLE]++;
      bram_read(0, d);
      check(d[15:0] == adc_code(dac_volts(y0)), $sformatf("ADC0 read %h for DAC data %h", d[15:0], y0));
      check(d[31:16] == adc_code(dac_volts(y1)), $sformatf("ADC1 read %h for DAC data %h", d[31:16], y1));
    end

    // --------------------------------------- TEMP / GAS / AIR QUALITY
    dac_bfm.write(12'h4, 32'h0001_8123);
    dac_bfm.write(12'h8, 32'h0001_9234);
    dac_bfm.write(12'hC, 32'h0001_A345);
    repeat (2) @(posedge dut.u_dac_ip.round_tick);
    repeat (420) @(posedge clk);
    check(m_dac[2][0] == 16'h8123 && m_dac[2][1] == 16'h9234 && m_dac[2][2] == 16'hA345,
          "TEMP/GAS/AIR QUALITY on DAC chip 2");
    if (m_dac[2][0] == 16'h8123) mech[M_DAC_STATIC]++;

    // ------------------------------------------------------------- DI/O
    dio_in = 10'b01_0000_0000;                // counted input 9 pressed
    repeat (10) @(posedge clk);
    dio_in = 10'b01_0000_0001;                // In1 on
    repeat (5) @(posedge clk);
    check(dio_irq, "DI/O interrupt on In1 rising");
    dio_bfm.read(12'h0, d);
    check(d[16] && d[7:0] == 8'h01, $sformatf("DI/O register %h", d));
    if (d[16]) mech[M_DIO_EDGE_IRQ]++;
    dio_bfm.write(12'h0, 32'h03FF_0000);
    check(!dio_irq, "DI/O interrupt cleared");
    repeat (200) @(posedge clk);
    dio_in = 10'b00_0000_0001;                // input 9 released
    repeat (5) @(posedge clk);
    dio_bfm.read(12'h0, d);
    check(d[24] && dio_irq, "press-time interrupt on release of input 9");
    if (d[24]) mech[M_DIO_COUNT_IRQ]++;
    dio_bfm.read(12'h4, d);
    check(d > 200 && d < 300, $sformatf("input 9 press time %0d clocks", d));
    dio_bfm.write(12'h0, 32'h03FF_5A00);
    check(dio_out == 8'h5A && !dio_irq, "DI/O output 5A, interrupts cleared");
    if (dio_out == 8'h5A) mech[M_DIO_OUT]++;

    // ------------------------------------------------------ summary
    for (int d2 = 0; d2 < 3; d2++) check(m_bad[d2] == 0, "no malformed DAC frame");
    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-32s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism never happened: %s", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
