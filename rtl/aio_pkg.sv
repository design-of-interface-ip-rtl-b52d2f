// aio_pkg: types and constants shared by the automotive I/O interface IPs.
//
// It holds the AXI4-Lite request/response bundles that every IP's slave
// port uses, the LTC2664 DAC SPI frame layout (4-bit command, 4-bit channel
// address, 16-bit data, sent MSB first), the DAC command codes, the DAC IP
// mode table and the register indices of all four IPs.
//
// The frame layout, the register bit fields and the two DAC modes with their
// amplitudes and phases follow the design description. The numeric command
// codes are the LTC2664 data sheet values; the description names the four
// commands but prints no codes. Register indices are 32-bit word indices,
// i.e. AXI byte address bits [ADDR_W-1:2], which is this design's choice.
package aio_pkg;

  // ---------------------------------------------------------------- AXI-Lite
  localparam int unsigned AXI_ADDR_W = 12;
  localparam int unsigned AXI_DATA_W = 32;

  typedef struct packed {
    logic [AXI_ADDR_W-1:0]   awaddr;
    logic                    awvalid;
    logic [AXI_DATA_W-1:0]   wdata;
    logic [AXI_DATA_W/8-1:0] wstrb;
    logic                    wvalid;
    logic                    bready;
    logic [AXI_ADDR_W-1:0]   araddr;
    logic                    arvalid;
    logic                    rready;
  } axil_req_t;

  typedef struct packed {
    logic                    awready;
    logic                    wready;
    logic [1:0]              bresp;
    logic                    bvalid;
    logic                    arready;
    logic [AXI_DATA_W-1:0]   rdata;
    logic [1:0]              rresp;
    logic                    rvalid;
  } axil_rsp_t;

  // ------------------------------------------------------- LTC2664 SPI frame
  typedef enum logic [3:0] {
    DAC_CMD_WRITE        = 4'b0000,  // write input register n
    DAC_CMD_UPDATE       = 4'b0001,  // update (power up) DAC register n
    DAC_CMD_WRITE_UPDATE = 4'b0011,  // write input register n and update n
    DAC_CMD_POWER_DOWN   = 4'b0100   // power down channel n
  } dac_cmd_e;

  typedef struct packed {
    dac_cmd_e    cmd;   // frame bits 23:20
    logic [3:0]  ch;    // frame bits 19:16
    logic [15:0] data;  // frame bits 15:0
  } dac_frame_t;

  localparam int unsigned DAC_FRAME_W = $bits(dac_frame_t);  // 24

  // ------------------------------------------------------------ DAC IP modes
  localparam logic [4:0] DAC_MODE_IDLE     = 5'd0;
  localparam logic [4:0] DAC_MODE_1        = 5'd1;
  localparam logic [4:0] DAC_MODE_2        = 5'd2;
  localparam logic [4:0] DAC_MODE_SELFTEST = 5'd31;

  // Waveform table: one sine period of WAVE_DEPTH entries.
  localparam int unsigned WAVE_DEPTH = 1000;
  localparam int unsigned WAVE_AW    = 10;

  // Per-channel settings of a waveform mode: start point in the table
  // (phase), address step per update (frequency) and amplitude in Q8
  // (256 = the DAC's full +/-10 V span, i.e. 20 Vpp).
  typedef struct packed {
    logic [WAVE_AW-1:0] start;
    logic [WAVE_AW-1:0] step;
    logic [8:0]         amp;
  } wave_cfg_t;

  // Mode 1: 7.2 Vpp at 0 deg and 18.0 Vpp at -68 deg; mode 2: 3.0 Vpp at
  // 0 deg and 7.2 Vpp at +90 deg, all at the same frequency. Channels 2
  // and 3 repeat channels 0 and 1. amp = round(Vpp / 20 V * 256);
  // start = round(phase / 360 * WAVE_DEPTH) mod WAVE_DEPTH.
  function automatic wave_cfg_t wave_cfg(input logic [4:0] mode, input logic [1:0] ch);
    wave_cfg_t c;
    c = '{start: '0, step: '0, amp: '0};
    unique case (mode)
      DAC_MODE_1: c = ch[0] ? '{start: 10'd811, step: 10'd1, amp: 9'd230}
                            : '{start: 10'd0,   step: 10'd1, amp: 9'd92};
      DAC_MODE_2: c = ch[0] ? '{start: 10'd250, step: 10'd1, amp: 9'd92}
                            : '{start: 10'd0,   step: 10'd1, amp: 9'd38};
      default:    c = '{start: '0, step: '0, amp: '0};
    endcase
    return c;
  endfunction

  // --------------------------------------------------------- register index
  // ADC IP
  localparam logic [9:0] ADC_REG_CTRL   = 10'd0;
  // DAC IP
  localparam logic [9:0] DAC_REG_CTRL   = 10'd0;
  localparam logic [9:0] DAC_REG_TEMP   = 10'd1;
  localparam logic [9:0] DAC_REG_GAS    = 10'd2;
  localparam logic [9:0] DAC_REG_AIRQ   = 10'd3;
  // DI/O IP
  localparam logic [9:0] DIO_REG_CTRL   = 10'd0;
  localparam logic [9:0] DIO_REG_CNT9   = 10'd1;
  localparam logic [9:0] DIO_REG_CNT10  = 10'd2;
  // Self-test IP
  localparam logic [9:0] ST_REG_MUX     = 10'd0;
  localparam logic [9:0] ST_REG_ADC0    = 10'd1;
  localparam logic [9:0] ST_REG_ADC1    = 10'd2;
  localparam logic [9:0] ST_REG_DAC0    = 10'd3;
  localparam logic [9:0] ST_REG_DAC1    = 10'd4;

endpackage
