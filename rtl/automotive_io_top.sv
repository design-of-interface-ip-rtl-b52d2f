// automotive_io_top: programmable-logic side of the automotive I/O
// controller.
//
// It joins the four interface IPs, each with its own AXI4-Lite slave port
// for the processor:
//   - ADC IP: two LTC2328 ADC interfaces writing samples into a dual-port
//     BRAM (port A); port B of the BRAM is brought out for the processor's
//     BRAM controller; adc_irq goes to an interrupt controller.
//   - DAC IP: three LTC2664 DAC interfaces (twelve channels) fed from the
//     waveform ROM.
//   - DI/O IP: ten inputs, eight outputs, dio_irq to an interrupt
//     controller.
//   - Self-test IP: two more ADC and two more DAC interfaces plus twenty
//     mux select/enable lines for board-level loop-back checks.
// The processor, the BRAM controller and the interrupt controllers are
// outside this module. All logic runs on clk with the active-low
// asynchronous reset rst_n; the SPI timing values assume a 100 MHz clock.
//
// The partitioning follows the system block diagram of the description;
// the port naming, the single clock and the reset are this design's
// choices.
module automotive_io_top
  import aio_pkg::*;
#(
  parameter int unsigned SAMPLES    = 1000,  // ADC samples per run in mode 1
  parameter int unsigned SAMPLE_DIV = 1000   // clocks per DAC update round
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor AXI4-Lite ports
  input  axil_req_t   adc_axi_req,
  output axil_rsp_t   adc_axi_rsp,
  input  axil_req_t   dac_axi_req,
  output axil_rsp_t   dac_axi_rsp,
  input  axil_req_t   dio_axi_req,
  output axil_rsp_t   dio_axi_rsp,
  input  axil_req_t   st_axi_req,
  output axil_rsp_t   st_axi_rsp,
  // interrupts
  output logic        adc_irq,
  output logic        dio_irq,
  // BRAM port B (to the processor's BRAM controller)
  input  logic        bram_b_en,
  input  logic [3:0]  bram_b_we,
  input  logic [9:0]  bram_b_addr,
  input  logic [31:0] bram_b_din,
  output logic [31:0] bram_b_dout,
  // ADC chips
  output logic [1:0]  adc_cnv,
  input  logic [1:0]  adc_busy,
  output logic [1:0]  adc_sck,
  input  logic [1:0]  adc_sdo,
  // DAC chips
  output logic [2:0]  dac_cs_n,
  output logic [2:0]  dac_sck,
  output logic [2:0]  dac_sdi,
  // digital I/O
  input  logic [9:0]  dio_in,
  output logic [7:0]  dio_out,
  // self-test board interface
  output logic [19:0] st_mux_sel,
  output logic [1:0]  st_adc_cnv,
  input  logic [1:0]  st_adc_busy,
  output logic [1:0]  st_adc_sck,
  input  logic [1:0]  st_adc_sdo,
  output logic [1:0]  st_dac_cs_n,
  output logic [1:0]  st_dac_sck,
  output logic [1:0]  st_dac_sdi
);

  // ------------------------------------------------------------ ADC IP
  logic        bram_a_en;
  logic [3:0]  bram_a_we;
  logic [9:0]  bram_a_addr;
  logic [31:0] bram_a_din;

  adc_ip #(.SAMPLES(SAMPLES), .BRAM_AW(10)) u_adc_ip (
    .clk, .rst_n,
    .s_axi_req(adc_axi_req), .s_axi_rsp(adc_axi_rsp), .irq(adc_irq),
    .bram_en(bram_a_en), .bram_we(bram_a_we), .bram_addr(bram_a_addr), .bram_din(bram_a_din),
    .adc_cnv, .adc_busy, .adc_sck, .adc_sdo
  );

  dp_bram #(.DEPTH(1024), .DATA_W(32)) u_bram (
    .clk,
    .a_en(bram_a_en), .a_we(bram_a_we), .a_addr(bram_a_addr), .a_din(bram_a_din), .a_dout(),
    .b_en(bram_b_en), .b_we(bram_b_we), .b_addr(bram_b_addr), .b_din(bram_b_din), .b_dout(bram_b_dout)
  );

  // ------------------------------------------------------------ DAC IP
  logic                     rom_en;
  logic [WAVE_AW-1:0]       rom_addr;
  logic signed [15:0]       rom_dout;

  dac_ip #(.SAMPLE_DIV(SAMPLE_DIV)) u_dac_ip (
    .clk, .rst_n,
    .s_axi_req(dac_axi_req), .s_axi_rsp(dac_axi_rsp),
    .rom_en, .rom_addr, .rom_dout,
    .dac_cs_n, .dac_sck, .dac_sdi, .round_tick()
  );

  wave_rom #(.DEPTH(WAVE_DEPTH), .AW(WAVE_AW)) u_rom (
    .clk, .en(rom_en), .addr(rom_addr), .dout(rom_dout)
  );

  // ------------------------------------------------------------ DI/O IP
  dio_ip u_dio_ip (
    .clk, .rst_n,
    .s_axi_req(dio_axi_req), .s_axi_rsp(dio_axi_rsp),
    .din(dio_in), .dout(dio_out), .irq(dio_irq)
  );

  // ------------------------------------------------------- self-test IP
  selftest_ip u_selftest_ip (
    .clk, .rst_n,
    .s_axi_req(st_axi_req), .s_axi_rsp(st_axi_rsp),
    .mux_sel(st_mux_sel),
    .adc_cnv(st_adc_cnv), .adc_busy(st_adc_busy), .adc_sck(st_adc_sck), .adc_sdo(st_adc_sdo),
    .dac_cs_n(st_dac_cs_n), .dac_sck(st_dac_sck), .dac_sdi(st_dac_sdi)
  );

endmodule
