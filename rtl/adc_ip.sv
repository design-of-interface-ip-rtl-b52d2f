// adc_ip: two-channel ADC acquisition IP with AXI4-Lite control.
//
// Register 0x00 (word index 0):
//   bit 9   ADC1 COMPLETE   bit 8   ADC0 COMPLETE
//   bits 3:2 ADC1 RUN MODE  bits 1:0 ADC0 RUN MODE
// Writing run mode 1 or 2 to an idle channel starts it. Mode 1 converts
// SAMPLES times and stores the samples at BRAM addresses 0..SAMPLES-1;
// mode 2 converts once and stores at address 0 (overwriting it each run).
// When the run ends the channel's COMPLETE bit is set, its run mode reads
// back as 0 again, and irq (the OR of the COMPLETE bits) goes high. Writing
// a 0 to a COMPLETE bit clears it (writing 1 leaves it); modes 0 and 3 and
// writes to a running channel do not start anything.
//
// Each 32-bit BRAM word holds one sample of each channel: ADC0 in bits
// 15:0, ADC1 in bits 31:16, written with byte enables through port A. If
// both channels have a sample in the same clock, ADC0 is written first and
// ADC1 one clock later. A channel starts its next conversion only after its
// previous sample is in the BRAM.
//
// Follows the description: two ADC interfaces, Table 2 bit fields, the
// flowchart's mode 1 = 1,000 reads and mode 2 = one read, COMPLETE plus
// interrupt, and the sample count as a parameter. The clear-by-writing-0
// rule, the lane packing per channel and the arbitration are this design's
// reading of the text.
module adc_ip
  import aio_pkg::*;
#(
  parameter int unsigned SAMPLES    = 1000,
  parameter int unsigned BRAM_AW    = 10,
  parameter int unsigned CNV_CYCLES = 4,
  parameter int unsigned SCK_HALF   = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  axil_req_t          s_axi_req,
  output axil_rsp_t          s_axi_rsp,
  output logic               irq,
  // BRAM port A
  output logic               bram_en,
  output logic [3:0]         bram_we,
  output logic [BRAM_AW-1:0] bram_addr,
  output logic [31:0]        bram_din,
  // converter pins, index = ADC number
  output logic [1:0]         adc_cnv,
  input  logic [1:0]         adc_busy,
  output logic [1:0]         adc_sck,
  input  logic [1:0]         adc_sdo
);

  typedef enum logic [1:0] {C_IDLE, C_CONV, C_STORE} ch_state_e;

  localparam logic [1:0] MODE_MULTI  = 2'd1;
  localparam logic [1:0] MODE_SINGLE = 2'd2;

  logic                  wr_en, rd_en;
  logic [AXI_ADDR_W-3:0] wr_idx, rd_idx;
  logic [31:0]           wr_data, rd_data;
  logic [3:0]            wr_strb;

  axil_slave u_axi (
    .clk, .rst_n, .req(s_axi_req), .rsp(s_axi_rsp),
    .wr_en, .wr_idx, .wr_data, .wr_strb, .rd_en, .rd_idx, .rd_data
  );

  ch_state_e          st     [2];
  logic [1:0]         mode_q [2];
  logic [BRAM_AW-1:0] count  [2];
  logic [15:0]        sample [2];
  logic [1:0]         complete;
  logic [1:0]         if_start, if_valid;
  logic [15:0]        if_data [2];
  logic [1:0]         grant;

  wire ctrl_wr = wr_en && (wr_idx == ADC_REG_CTRL);

  // ADC0 has priority on BRAM port A.
  always_comb begin
    grant[0] = (st[0] == C_STORE);
    grant[1] = (st[1] == C_STORE) && !grant[0];
    bram_en   = |grant;
    bram_we   = grant[0] ? 4'b0011 : (grant[1] ? 4'b1100 : 4'b0000);
    bram_addr = grant[0] ? count[0] : count[1];
    bram_din  = grant[0] ? {16'h0, sample[0]} : {sample[1], 16'h0};
  end

  for (genvar k = 0; k < 2; k++) begin : g_ch
    adc_spi_if #(.DATA_W(16), .CNV_CYCLES(CNV_CYCLES), .SCK_HALF(SCK_HALF)) u_if (
      .clk, .rst_n,
      .start(if_start[k]), .busy(), .data(if_data[k]), .valid(if_valid[k]),
      .cnv(adc_cnv[k]), .adc_busy(adc_busy[k]), .sck(adc_sck[k]), .sdo(adc_sdo[k])
    );

    wire [1:0] wmode    = wr_data[2*k +: 2];
    wire       run_req  = ctrl_wr && wr_strb[0] && (st[k] == C_IDLE) &&
                          (wmode == MODE_MULTI || wmode == MODE_SINGLE);
    wire       last     = (mode_q[k] == MODE_SINGLE) ||
                          (count[k] == BRAM_AW'(SAMPLES - 1));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st[k]       <= C_IDLE;
        mode_q[k]   <= '0;
        count[k]    <= '0;
        sample[k]   <= '0;
        complete[k] <= 1'b0;
        if_start[k] <= 1'b0;
      end else begin
        if_start[k] <= 1'b0;
        if (ctrl_wr && wr_strb[1] && !wr_data[8+k]) complete[k] <= 1'b0;
        unique case (st[k])
          C_IDLE: if (run_req) begin
            mode_q[k]   <= wmode;
            count[k]    <= '0;
            if_start[k] <= 1'b1;
            st[k]       <= C_CONV;
          end
          C_CONV: if (if_valid[k]) begin
            sample[k] <= if_data[k];
            st[k]     <= C_STORE;
          end
          C_STORE: if (grant[k]) begin
            if (last) begin
              complete[k] <= 1'b1;
              mode_q[k]   <= '0;
              st[k]       <= C_IDLE;
            end else begin
              count[k]    <= count[k] + 1'b1;
              if_start[k] <= 1'b1;
              st[k]       <= C_CONV;
            end
          end
          default: st[k] <= C_IDLE;
        endcase
      end
    end
  end

  assign irq = |complete;

  always_comb begin
    rd_data = '0;
    if (rd_idx == ADC_REG_CTRL)
      rd_data = {22'h0, complete, 4'h0, mode_q[1], mode_q[0]};
  end

  // Port A never sees two writers at once.
  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) !(grant[0] && grant[1]));

endmodule
