// dac_ip: three-chip, twelve-channel DAC output IP with AXI4-Lite control.
//
// Registers (word index):
//   0  bits 31:16 self-test data, bits 15:11 mode select,
//      bits 10:0 output setup (bit n enables DAC chip n, n = 0..2)
//   1  bit 16 TEMP write, bits 15:0 TEMP data
//   2  bit 16 GAS write,  bits 15:0 GAS data
//   3  bit 16 AIR QUALITY write, bits 15:0 AIR QUALITY data
//
// Every SAMPLE_DIV clocks an update round runs. In a waveform mode (1 or 2)
// the IP reads one waveform-ROM entry per channel (four reads through the
// ROM port, one clock each, synchronous ROM), at the channel's own table
// address, and scales it: code = 32768 + (entry * amp) >>> 8, an offset-
// binary code for a DAC set to a +/-10 V span. Each channel's address then
// advances by the mode's step, modulo the table length. The mode table
// (aio_pkg::wave_cfg) gives every channel its start address (phase), step
// (frequency) and amplitude; writing a new mode reloads the start
// addresses. In self-test mode (31) every channel gets the self-test data
// instead; mode 0 outputs nothing. The three DAC interfaces then each send
// the four channels of their chip, channel 0 to 3, as write-and-update
// frames. A TEMP, GAS or AIR QUALITY value whose write bit is set is sent
// on channel 0, 1 or 2 of DAC chip 2 in every round, overriding the mode,
// whether or not chip 2 is enabled. A round that falls due while the
// interfaces are still busy is skipped.
//
// Follows the description: three DAC interfaces of four channels, Table 3
// register fields, mode-dependent start point, frequency and amplitude
// read from a ROM, the channel 0..3 sequence and the self-test data path;
// the two modes' amplitudes and phases are the reference values of the
// measured outputs. The meaning of the output-setup bits, the mode
// numbers 0 and 31, the scaling formula, the round timing and the chip and
// channel used by TEMP, GAS and AIR QUALITY are this design's choices.
module dac_ip
  import aio_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV = 1000,  // clocks per update round
  parameter int unsigned SCK_HALF   = 2,
  parameter int unsigned CS_GAP     = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  axil_req_t          s_axi_req,
  output axil_rsp_t          s_axi_rsp,
  // waveform ROM port
  output logic               rom_en,
  output logic [WAVE_AW-1:0] rom_addr,
  input  logic signed [15:0] rom_dout,
  // DAC pins, index = DAC chip
  output logic [2:0]         dac_cs_n,
  output logic [2:0]         dac_sck,
  output logic [2:0]         dac_sdi,
  // one clock per round sent, for monitoring
  output logic               round_tick
);

  typedef enum logic [1:0] {R_WAIT, R_FILL, R_SEND} round_e;

  logic                  wr_en, rd_en;
  logic [AXI_ADDR_W-3:0] wr_idx, rd_idx;
  logic [31:0]           wr_data, rd_data;
  logic [3:0]            wr_strb;

  axil_slave u_axi (
    .clk, .rst_n, .req(s_axi_req), .rsp(s_axi_rsp),
    .wr_en, .wr_idx, .wr_data, .wr_strb, .rd_en, .rd_idx, .rd_data
  );

  // ---------------------------------------------------------- registers
  logic [31:0] ctrl_q;
  logic [16:0] stat_q [3];   // TEMP, GAS, AIR QUALITY

  wire [15:0] st_data = ctrl_q[31:16];
  wire [4:0]  mode    = ctrl_q[15:11];
  wire [2:0]  chip_en = ctrl_q[2:0];
  wire        wave_mode = (mode == DAC_MODE_1) || (mode == DAC_MODE_2);

  logic [4:0] new_mode;
  always_comb begin
    new_mode = mode;
    if (wr_en && wr_idx == DAC_REG_CTRL && wr_strb[1]) new_mode = wr_data[15:11];
  end
  wire mode_change = (new_mode != mode);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q <= '0;
      for (int i = 0; i < 3; i++) stat_q[i] <= '0;
    end else if (wr_en) begin
      if (wr_idx == DAC_REG_CTRL) begin
        for (int b = 0; b < 4; b++) if (wr_strb[b]) ctrl_q[8*b +: 8] <= wr_data[8*b +: 8];
      end
      for (int i = 0; i < 3; i++) begin
        if (wr_idx == DAC_REG_TEMP + 10'(i)) begin
          if (wr_strb[0]) stat_q[i][7:0]  <= wr_data[7:0];
          if (wr_strb[1]) stat_q[i][15:8] <= wr_data[15:8];
          if (wr_strb[2]) stat_q[i][16]   <= wr_data[16];
        end
      end
    end
  end

  always_comb begin
    rd_data = '0;
    unique case (rd_idx)
      DAC_REG_CTRL: rd_data = ctrl_q;
      DAC_REG_TEMP: rd_data = {15'h0, stat_q[0]};
      DAC_REG_GAS:  rd_data = {15'h0, stat_q[1]};
      DAC_REG_AIRQ: rd_data = {15'h0, stat_q[2]};
      default:      rd_data = '0;
    endcase
  end

  // ------------------------------------------------------- round control
  localparam int unsigned TW = $clog2(SAMPLE_DIV + 1);

  round_e             rstate;
  logic [TW-1:0]      timer;
  logic [2:0]         fidx;                 // ROM read index 0..4
  logic [WAVE_AW-1:0] acc   [4];            // per-channel table address
  logic [15:0]        wcode [4];            // per-channel waveform code
  logic [2:0]         if_start, if_busy, if_done;
  logic [3:0]         chip_ch_en [3];
  logic [15:0]        chip_data  [3][4];

  wave_cfg_t cfg [4];
  for (genvar c = 0; c < 4; c++) begin : g_cfg
    assign cfg[c] = wave_cfg(mode, 2'(c));
  end

  wire tick = (timer == '0);

  assign rom_en   = (rstate == R_FILL) && (fidx < 3'd4);
  assign rom_addr = acc[fidx[1:0]];

  // Scaled code of the entry read in the previous clock.
  logic signed [25:0] prod;
  logic        [1:0]  pch;
  assign pch  = 2'(fidx - 3'd1);
  assign prod = rom_dout * $signed({1'b0, cfg[pch].amp});

  function automatic logic [WAVE_AW-1:0] wrap_add(input logic [WAVE_AW-1:0] a,
                                                  input logic [WAVE_AW-1:0] b);
    logic [WAVE_AW:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= (WAVE_AW+1)'(WAVE_DEPTH)) s = s - (WAVE_AW+1)'(WAVE_DEPTH);
    return s[WAVE_AW-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate     <= R_WAIT;
      timer      <= TW'(SAMPLE_DIV - 1);
      fidx       <= '0;
      if_start   <= '0;
      round_tick <= 1'b0;
      for (int c = 0; c < 4; c++) begin
        acc[c]   <= '0;
        wcode[c] <= 16'h8000;
      end
    end else begin
      if_start   <= '0;
      round_tick <= 1'b0;
      timer      <= tick ? TW'(SAMPLE_DIV - 1) : timer - 1'b1;
      if (mode_change) begin
        for (int c = 0; c < 4; c++) acc[c] <= wave_cfg(new_mode, 2'(c)).start;
      end
      unique case (rstate)
        R_WAIT: if (tick && !(|if_busy)) begin
          fidx   <= '0;
          rstate <= R_FILL;
        end
        R_FILL: begin
          if (fidx != 3'd0) wcode[pch] <= 16'(32'sd32768 + 32'(prod >>> 8));
          if (fidx == 3'd4) begin
            if_start <= 3'b111;
            rstate   <= R_SEND;
          end
          fidx <= fidx + 1'b1;
        end
        R_SEND: begin
          // Advance the waveform addresses once per round.
          if (!mode_change && wave_mode)
            for (int c = 0; c < 4; c++) acc[c] <= wrap_add(acc[c], cfg[c].step);
          round_tick <= 1'b1;
          rstate     <= R_WAIT;
        end
        default: rstate <= R_WAIT;
      endcase
    end
  end

  // --------------------------------------------------- channel contents
  always_comb begin
    for (int d = 0; d < 3; d++) begin
      for (int c = 0; c < 4; c++) begin
        chip_data[d][c]  = (mode == DAC_MODE_SELFTEST) ? st_data : wcode[c];
      end
      chip_ch_en[d] = (chip_en[d] && (wave_mode || mode == DAC_MODE_SELFTEST)) ? 4'hF : 4'h0;
    end
    for (int i = 0; i < 3; i++) begin
      if (stat_q[i][16]) begin
        chip_data[2][i]  = stat_q[i][15:0];
        chip_ch_en[2][i] = 1'b1;
      end
    end
  end

  for (genvar d = 0; d < 3; d++) begin : g_dac
    dac_spi_if #(.SCK_HALF(SCK_HALF), .CS_GAP(CS_GAP)) u_if (
      .clk, .rst_n,
      .start(if_start[d]), .cmd(DAC_CMD_WRITE_UPDATE),
      .ch_en(chip_ch_en[d]), .ch_data(chip_data[d]),
      .busy(if_busy[d]), .done(if_done[d]),
      .cs_n(dac_cs_n[d]), .sck(dac_sck[d]), .sdi(dac_sdi[d])
    );
  end

endmodule
