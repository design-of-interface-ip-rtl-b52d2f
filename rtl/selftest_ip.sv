// selftest_ip: loop-back test IP for the ADC and DAC IPs, AXI4-Lite control.
//
// It has its own two ADC interfaces and two DAC interfaces (the same
// adc_spi_if and dac_spi_if used by the ADC and DAC IPs) and 20 digital
// outputs that drive the enable and select inputs of four analog muxes on
// the board. A mux routes one of a DAC chip's four outputs to an ADC chip:
// the DAC IP's chips feed this IP's ADCs, and this IP's DACs feed the ADC
// IP's converters. Registers (word index):
//   0  bits 19:0 mux selection, driven on mux_sel. Per mux 5 bits:
//      [3:0] select lines 0..3, [4] enable; mux 0 = bits 4:0 (DAC0 path),
//      mux 1 = bits 9:5 (DAC1 path), mux 2 = bits 14:10 (ADC0 path),
//      mux 3 = bits 19:15 (ADC1 path)
//   1  ADC0: bit 17 COMPLETE, bit 16 RUN, bits 15:0 data (read only)
//   2  ADC1: same layout
//   3  DAC0: bit 16 RUN, bits 15:0 data
//   4  DAC1: same layout
// Writing RUN = 1 to an idle ADC register starts one conversion; RUN reads
// 1 until the result is in bits 15:0, then COMPLETE is set. Writing 0 to
// COMPLETE clears it. Writing RUN = 1 to a DAC register sends its data as
// write-and-update frames to all four channels of its DAC chip; RUN reads
// 1 until the last frame is out. Software compares what it wrote with what
// it reads back.
//
// Follows the description: two ADC and two DAC interfaces reused from the
// other IPs, the Table 5 register fields and 20 mux select/enable outputs
// (5 per mux, as the select 0~3 and EN labels show). The order of the
// mux groups, the clear rule and sending DAC data to all four channels are
// this design's choices.
module selftest_ip
  import aio_pkg::*;
#(
  parameter int unsigned CNV_CYCLES = 4,
  parameter int unsigned SCK_HALF   = 2,
  parameter int unsigned CS_GAP     = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   s_axi_req,
  output axil_rsp_t   s_axi_rsp,
  output logic [19:0] mux_sel,
  // self-test ADC pins
  output logic [1:0]  adc_cnv,
  input  logic [1:0]  adc_busy,
  output logic [1:0]  adc_sck,
  input  logic [1:0]  adc_sdo,
  // self-test DAC pins
  output logic [1:0]  dac_cs_n,
  output logic [1:0]  dac_sck,
  output logic [1:0]  dac_sdi
);

  logic                  wr_en, rd_en;
  logic [AXI_ADDR_W-3:0] wr_idx, rd_idx;
  logic [31:0]           wr_data, rd_data;
  logic [3:0]            wr_strb;

  axil_slave u_axi (
    .clk, .rst_n, .req(s_axi_req), .rsp(s_axi_rsp),
    .wr_en, .wr_idx, .wr_data, .wr_strb, .rd_en, .rd_idx, .rd_data
  );

  logic [19:0] mux_q;
  logic [1:0]  adc_run, adc_cmp, adc_start, adc_valid, adc_ifbusy;
  logic [15:0] adc_data [2];
  logic [15:0] adc_res  [2];
  logic [1:0]  dac_run, dac_start, dac_done;
  logic [15:0] dac_data [2];

  assign mux_sel = mux_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mux_q <= '0;
    else if (wr_en && wr_idx == ST_REG_MUX) begin
      if (wr_strb[0]) mux_q[7:0]   <= wr_data[7:0];
      if (wr_strb[1]) mux_q[15:8]  <= wr_data[15:8];
      if (wr_strb[2]) mux_q[19:16] <= wr_data[19:16];
    end
  end

  for (genvar k = 0; k < 2; k++) begin : g_ch
    wire adc_wr = wr_en && (wr_idx == ST_REG_ADC0 + 10'(k)) && wr_strb[2];
    wire dac_wr = wr_en && (wr_idx == ST_REG_DAC0 + 10'(k));

    adc_spi_if #(.DATA_W(16), .CNV_CYCLES(CNV_CYCLES), .SCK_HALF(SCK_HALF)) u_adc (
      .clk, .rst_n,
      .start(adc_start[k]), .busy(adc_ifbusy[k]), .data(adc_data[k]), .valid(adc_valid[k]),
      .cnv(adc_cnv[k]), .adc_busy(adc_busy[k]), .sck(adc_sck[k]), .sdo(adc_sdo[k])
    );

    dac_spi_if #(.SCK_HALF(SCK_HALF), .CS_GAP(CS_GAP)) u_dac (
      .clk, .rst_n,
      .start(dac_start[k]), .cmd(DAC_CMD_WRITE_UPDATE), .ch_en(4'hF),
      .ch_data('{dac_data[k], dac_data[k], dac_data[k], dac_data[k]}),
      .busy(), .done(dac_done[k]),
      .cs_n(dac_cs_n[k]), .sck(dac_sck[k]), .sdi(dac_sdi[k])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        adc_run[k]   <= 1'b0;
        adc_cmp[k]   <= 1'b0;
        adc_start[k] <= 1'b0;
        adc_res[k]   <= '0;
        dac_run[k]   <= 1'b0;
        dac_start[k] <= 1'b0;
        dac_data[k]  <= '0;
      end else begin
        adc_start[k] <= 1'b0;
        dac_start[k] <= 1'b0;
        // ADC: RUN starts one conversion, COMPLETE reports its end.
        if (adc_wr && !wr_data[17]) adc_cmp[k] <= 1'b0;
        if (adc_wr && wr_data[16] && !adc_run[k] && !adc_ifbusy[k]) begin
          adc_run[k]   <= 1'b1;
          adc_start[k] <= 1'b1;
        end
        if (adc_valid[k]) begin
          adc_res[k] <= adc_data[k];
          adc_run[k] <= 1'b0;
          adc_cmp[k] <= 1'b1;
        end
        // DAC: RUN sends the data word to the four channels.
        if (dac_wr && !dac_run[k]) begin
          if (wr_strb[0]) dac_data[k][7:0]  <= wr_data[7:0];
          if (wr_strb[1]) dac_data[k][15:8] <= wr_data[15:8];
          if (wr_strb[2] && wr_data[16]) begin
            dac_run[k]   <= 1'b1;
            dac_start[k] <= 1'b1;
          end
        end
        if (dac_done[k]) dac_run[k] <= 1'b0;
      end
    end
  end

  always_comb begin
    rd_data = '0;
    unique case (rd_idx)
      ST_REG_MUX:  rd_data = {12'h0, mux_q};
      ST_REG_ADC0: rd_data = {14'h0, adc_cmp[0], adc_run[0], adc_res[0]};
      ST_REG_ADC1: rd_data = {14'h0, adc_cmp[1], adc_run[1], adc_res[1]};
      ST_REG_DAC0: rd_data = {15'h0, dac_run[0], dac_data[0]};
      ST_REG_DAC1: rd_data = {15'h0, dac_run[1], dac_data[1]};
      default:     rd_data = '0;
    endcase
  end

endmodule
