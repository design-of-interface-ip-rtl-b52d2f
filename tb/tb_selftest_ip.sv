// tb_selftest_ip: checks selftest_ip with two LTC2328 and two LTC2664
// models.
//
// The mux selection register must drive all 20 mux lines; an ADC RUN must
// make one conversion whose code appears in the register with COMPLETE set
// and RUN cleared; a DAC RUN must put the data word on all four channels
// of its DAC chip as write-and-update frames, with RUN reading 1 until the
// last frame is out.
module tb_selftest_ip
  import aio_pkg::*;
;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic [19:0] mux_sel;
  logic [1:0] cnv, busy, sck, sdo, cs_n, dsck, sdi;
  logic signed [15:0] code [2];
  int conv [2];
  logic [15:0] in_reg [2][4], dac_reg [2][4];
  int frames [2], bad [2];
  int checks = 0, failures = 0;

  selftest_ip dut (.clk, .rst_n, .s_axi_req(req), .s_axi_rsp(rsp), .mux_sel,
    .adc_cnv(cnv), .adc_busy(busy), .adc_sck(sck), .adc_sdo(sdo),
    .dac_cs_n(cs_n), .dac_sck(dsck), .dac_sdi(sdi));
  axil_bfm bfm (.clk, .req, .rsp);

  for (genvar k = 0; k < 2; k++) begin : g_m
    ltc2328_model adc (.clk, .code(code[k]), .cnv(cnv[k]), .busy(busy[k]), .sck(sck[k]),
                       .sdo(sdo[k]), .conversions(conv[k]));
    ltc2664_model dac (.cs_n(cs_n[k]), .sck(dsck[k]), .sdi(sdi[k]), .in_reg(in_reg[k]),
                       .dac_reg(dac_reg[k]), .powered_down(), .frames(frames[k]),
                       .bad_frames(bad[k]), .last_frame());
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    code[0] = 0; code[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int n = 0; n < 4; n++) begin
      automatic logic [19:0] m = 20'($urandom);
      bfm.write(12'h0, {12'hFFF, m});
      check(mux_sel == m, $sformatf("mux lines %h want %h", mux_sel, m));
      bfm.read(12'h0, d);
      check(d == {12'h0, m}, "mux register read-back");
    end

    for (int n = 0; n < 6; n++) begin
      for (int k = 0; k < 2; k++) begin
        automatic logic signed [15:0] v = 16'($urandom);
        automatic int c0 = conv[k];
        code[k] = v;
        bfm.write(12'(4 + 4 * k), 32'h0001_0000);      // RUN, clear COMPLETE
        bfm.read(12'(4 + 4 * k), d);
        check(d[17:16] == 2'b01, $sformatf("ADC%0d RUN while converting: %b", k, d[17:16]));
        do bfm.read(12'(4 + 4 * k), d); while (!d[17]);
        check(d[16] == 0 && d[15:0] == v, $sformatf("ADC%0d result %h want %h", k, d[15:0], v));
        check(conv[k] == c0 + 1, "one conversion per RUN");
      end
    end
    bfm.write(12'h4, 32'h0000_0000);
    bfm.read(12'h4, d);
    check(d[17] == 0, "ADC0 COMPLETE cleared by writing 0");

    for (int n = 0; n < 4; n++) begin
      for (int k = 0; k < 2; k++) begin
        automatic logic [15:0] v = 16'($urandom);
        automatic int f0 = frames[k];
        bfm.write(12'(12 + 4 * k), {15'h0, 1'b1, v});
        bfm.read(12'(12 + 4 * k), d);
        check(d[16] == 1, "DAC RUN reads 1 while sending");
        do bfm.read(12'(12 + 4 * k), d); while (d[16]);
        check(frames[k] == f0 + 4, $sformatf("DAC%0d sent %0d frames", k, frames[k] - f0));
        for (int c = 0; c < 4; c++)
          check(dac_reg[k][c] == v, $sformatf("DAC%0d ch %0d: %h want %h", k, c, dac_reg[k][c], v));
      end
    end
    check(bad[0] == 0 && bad[1] == 0, "no frame of wrong length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
