// tb_adc_ip: checks adc_ip with two LTC2328 models and a dual-port BRAM.
//
// Each model's input code is a known function of how many conversions it
// has done, so every stored sample can be predicted. The test runs mode 2
// (one sample at address 0) on ADC0, clears COMPLETE, then mode 1 on both
// channels at once (SAMPLES samples each, packed ADC0 in bits 15:0 and
// ADC1 in bits 31:16), and checks the BRAM contents through port B, the
// COMPLETE bits, the run-mode read-back, the interrupt, that run mode 3 and
// a second start while running do nothing, and the run time in clocks.
module tb_adc_ip
  import aio_pkg::*;
;
  localparam int SAMPLES = 20;
  localparam int CONV_CLKS = 50;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic irq;
  logic bram_en;
  logic [3:0] bram_we;
  logic [9:0] bram_addr;
  logic [31:0] bram_din;
  logic [1:0] cnv, busy, sck, sdo;
  int conv [2];
  logic signed [15:0] code [2];
  logic b_en = 0;
  logic [9:0] b_addr = 0;
  logic [31:0] b_dout;
  int checks = 0, failures = 0;

  adc_ip #(.SAMPLES(SAMPLES)) dut (
    .clk, .rst_n, .s_axi_req(req), .s_axi_rsp(rsp), .irq,
    .bram_en, .bram_we, .bram_addr, .bram_din,
    .adc_cnv(cnv), .adc_busy(busy), .adc_sck(sck), .adc_sdo(sdo));

  dp_bram #(.DEPTH(1024)) bram (
    .clk, .a_en(bram_en), .a_we(bram_we), .a_addr(bram_addr), .a_din(bram_din), .a_dout(),
    .b_en, .b_we(4'h0), .b_addr, .b_din(32'h0), .b_dout);

  axil_bfm bfm (.clk, .req, .rsp);

  function automatic logic signed [15:0] code_of(input int k, input int n);
    return k == 0 ? 16'(100 + 37 * n) : 16'(-20000 + 1234 * n);
  endfunction

  for (genvar k = 0; k < 2; k++) begin : g_adc
    assign code[k] = code_of(k, conv[k]);
    ltc2328_model #(.CONV_CLKS(CONV_CLKS)) adc (
      .clk, .code(code[k]), .cnv(cnv[k]), .busy(busy[k]), .sck(sck[k]), .sdo(sdo[k]),
      .conversions(conv[k]));
  end

  int both_store = 0;
  always @(posedge clk) if (dut.st[0] == 2'd2 && dut.st[1] == 2'd2) both_store++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bram_read(input int a, output logic [31:0] d);
    @(negedge clk); b_en = 1; b_addr = 10'(a);
    @(negedge clk); b_en = 0;
    d = b_dout;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int t0, t1, c0, c1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(irq == 0, "no interrupt after reset");

    // Mode 3 is not a run mode.
    bfm.write(12'h0, 32'h0000_0003);
    repeat (200) @(posedge clk);
    check(conv[0] == 0 && irq == 0, "run mode 3 starts nothing");

    // Mode 2 on ADC0: one sample, stored at address 0.
    bfm.write(12'h0, 32'h0000_0002);
    bfm.read(12'h0, d);
    check(d[1:0] == 2'd2, "ADC0 run mode reads back 2 while running");
    while (!irq) @(posedge clk);
    bfm.read(12'h0, d);
    check(d == 32'h0000_0100, $sformatf("after mode 2: register %h, want 00000100", d));
    bram_read(0, d);
    check(d[15:0] == code_of(0, 0), $sformatf("mode 2 sample %h", d[15:0]));
    check(conv[0] == 1 && conv[1] == 0, "mode 2 converts exactly once");

    // Clear COMPLETE by writing 0.
    bfm.write(12'h0, 32'h0000_0000);
    @(posedge clk);
    check(irq == 0, "interrupt cleared with COMPLETE");
    bfm.read(12'h0, d);
    check(d == 0, "register idle");

    // Mode 1 on both channels.
    c0 = conv[0]; c1 = conv[1];
    bfm.write(12'h0, 32'h0000_0005);
    t0 = $time;
    bfm.write(12'h0, 32'h0000_0005);   // ignored while running
    while (!irq) @(posedge clk);
    t1 = $time;
    bfm.read(12'h0, d);
    while (d[9:8] != 2'b11) bfm.read(12'h0, d);
    check(d == 32'h0000_0300, $sformatf("after mode 1: register %h", d));
    check(conv[0] - c0 == SAMPLES && conv[1] - c1 == SAMPLES, "mode 1 converts SAMPLES times on each ADC");
    for (int a = 0; a < SAMPLES + 2; a++) begin
      bram_read(a, d);
      if (a < SAMPLES) begin
        check(d[15:0] == code_of(0, c0 + a), $sformatf("addr %0d ADC0 %h want %h", a, d[15:0], code_of(0, c0 + a)));
        check(d[31:16] == code_of(1, c1 + a), $sformatf("addr %0d ADC1 %h want %h", a, d[31:16], code_of(1, c1 + a)));
      end else begin
        check(d == 0, $sformatf("addr %0d beyond the run is untouched", a));
      end
    end
    // One conversion: CONV_CLKS + 3 + 31*SCK_HALF clocks, plus store and restart.
    begin
      automatic int clocks = (t1 - t0) / 10;
      $display("mode 1 run of %0d samples: %0d clocks", SAMPLES, clocks);
      check(clocks >= SAMPLES * (CONV_CLKS + 3 + 62) && clocks <= SAMPLES * (CONV_CLKS + 3 + 62 + 8),
            $sformatf("mode 1 run took %0d clocks", clocks));
    end
    check(both_store > 0, "both channels competed for the BRAM port");

    // Clear only ADC0's COMPLETE: irq stays for ADC1.
    bfm.write(12'h0, 32'h0000_0200);
    @(posedge clk);
    check(irq == 1, "interrupt stays while ADC1 COMPLETE is set");
    bfm.write(12'h0, 32'h0000_0000);
    @(posedge clk);
    check(irq == 0, "interrupt clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
