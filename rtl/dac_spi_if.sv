// dac_spi_if: writes the four channels of an LTC2664-style quad DAC over SPI.
//
// A start pulse captures cmd, the channel enables and the four 16-bit
// channel codes, then sends one 24-bit frame per enabled channel, channel
// 0 first and channel 3 last: {cmd[3:0], channel[3:0], code[15:0]}, MSB
// first. For each frame CS_n goes low; SDI changes while SCK is low and is
// read by the DAC on the rising SCK edge; SCK is low and high for SCK_HALF
// clocks each. After the 24th bit CS_n rises (the DAC acts on the frame)
// and stays high for CS_GAP clocks before the next frame. done pulses for
// one clock after the last frame. A frame takes 48*SCK_HALF + CS_GAP + 1
// clocks.
//
// The frame layout and the channel 0..3 sequence follow the description;
// the SPI timing values are this design's choice, within LTC2664 limits at
// a 100 MHz clock.
module dac_spi_if
  import aio_pkg::*;
#(
  parameter int unsigned SCK_HALF = 2,
  parameter int unsigned CS_GAP   = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  dac_cmd_e    cmd,
  input  logic [3:0]  ch_en,
  input  logic [15:0] ch_data [4],
  output logic        busy,
  output logic        done,
  // DAC pins
  output logic        cs_n,
  output logic        sck,
  output logic        sdi
);

  typedef enum logic [2:0] {S_IDLE, S_NEXT, S_LO, S_HI, S_GAP} state_e;

  localparam int unsigned CW = $clog2(SCK_HALF + CS_GAP + 1);

  state_e                 state;
  logic [CW-1:0]          cnt;
  logic [4:0]             nbit;
  logic [1:0]             ch;
  logic [3:0]             en_q;
  dac_cmd_e               cmd_q;
  logic [15:0]            data_q [4];
  logic [DAC_FRAME_W-1:0] shreg;
  dac_frame_t             frame;

  assign busy  = (state != S_IDLE);
  assign frame = '{cmd: cmd_q, ch: {2'b00, ch}, data: data_q[ch]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      nbit  <= '0;
      ch    <= '0;
      en_q  <= '0;
      cmd_q <= DAC_CMD_WRITE_UPDATE;
      for (int i = 0; i < 4; i++) data_q[i] <= '0;
      shreg <= '0;
      done  <= 1'b0;
      cs_n  <= 1'b1;
      sck   <= 1'b0;
      sdi   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          en_q   <= ch_en;
          cmd_q  <= cmd;
          data_q <= ch_data;
          ch     <= 2'd0;
          state  <= S_NEXT;
        end
        // Channel select: skip disabled channels, finish after channel 3.
        S_NEXT: begin
          if (en_q[ch]) begin
            cs_n  <= 1'b0;
            sdi   <= frame[DAC_FRAME_W-1];
            shreg <= {frame[DAC_FRAME_W-2:0], 1'b0};
            nbit  <= '0;
            cnt   <= CW'(SCK_HALF - 1);
            state <= S_LO;
          end else if (ch == 2'd3) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            ch <= ch + 1'b1;
          end
        end
        S_LO: begin
          if (cnt == '0) begin
            sck   <= 1'b1;
            cnt   <= CW'(SCK_HALF - 1);
            state <= S_HI;
          end else cnt <= cnt - 1'b1;
        end
        S_HI: begin
          if (cnt == '0) begin
            sck <= 1'b0;
            if (nbit == 5'(DAC_FRAME_W - 1)) begin
              cs_n  <= 1'b1;
              cnt   <= CW'(CS_GAP - 1);
              state <= S_GAP;
            end else begin
              nbit  <= nbit + 1'b1;
              sdi   <= shreg[DAC_FRAME_W-1];
              shreg <= {shreg[DAC_FRAME_W-2:0], 1'b0};
              cnt   <= CW'(SCK_HALF - 1);
              state <= S_LO;
            end
          end else cnt <= cnt - 1'b1;
        end
        S_GAP: begin
          if (cnt == '0) begin
            if (ch == 2'd3) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              ch    <= ch + 1'b1;
              state <= S_NEXT;
            end
          end else cnt <= cnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The chip select stays low for exactly one frame at a time.
  a_sck_only_selected: assert property (@(posedge clk) disable iff (!rst_n) sck |-> !cs_n);

endmodule
