// adc_spi_if: one conversion and serial read from an LTC2328-style 16-bit
// SAR ADC.
//
// A start pulse raises CNV for CNV_CYCLES clocks. The interface then waits
// for the converter's BUSY output to rise and fall (BUSY passes a two-flop
// synchroniser), and reads the 16-bit result MSB first: SCK is low for
// SCK_HALF clocks, SDO is sampled at the end of the low phase, then SCK is
// high for SCK_HALF clocks; the converter moves SDO to its next bit on each
// rising SCK edge. After the 16th bit, data holds the two's-complement code
// and valid pulses for one clock; the read uses 15 rising SCK edges. A
// conversion takes about the BUSY time (which starts with CNV) + 3
// synchroniser clocks + 31*SCK_HALF clocks.
//
// CNV, BUSY, SCK and a 16-bit result read over SPI follow the design
// description; CNV length, SCK rate and the sampling edge are this design's
// choices, kept inside the LTC2328 data-sheet limits at a 100 MHz clock.
module adc_spi_if #(
  parameter int unsigned DATA_W     = 16,
  parameter int unsigned CNV_CYCLES = 4,
  parameter int unsigned SCK_HALF   = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,   // one-clock request for a conversion
  output logic              busy,    // interface is converting or reading
  output logic [DATA_W-1:0] data,
  output logic              valid,   // one clock, data is new
  // converter pins
  output logic              cnv,
  input  logic              adc_busy,
  output logic              sck,
  input  logic              sdo
);

  typedef enum logic [2:0] {S_IDLE, S_CNV, S_WAIT_HI, S_WAIT_LO, S_SCK_LO, S_SCK_HI} state_e;

  localparam int unsigned CW = $clog2(CNV_CYCLES + SCK_HALF + 1);
  localparam int unsigned BW = $clog2(DATA_W + 1);

  state_e              state;
  logic [CW-1:0]       cnt;
  logic [BW-1:0]       nbits;
  logic [DATA_W-1:0]   shreg;
  logic [1:0]          busy_sync;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_sync <= '0;
    else        busy_sync <= {busy_sync[0], adc_busy};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      nbits <= '0;
      shreg <= '0;
      data  <= '0;
      valid <= 1'b0;
      cnv   <= 1'b0;
      sck   <= 1'b0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_CNV;
          cnv   <= 1'b1;
          cnt   <= CW'(CNV_CYCLES - 1);
        end
        S_CNV: begin
          if (cnt == '0) begin
            cnv   <= 1'b0;
            state <= S_WAIT_HI;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_WAIT_HI: if (busy_sync[1]) state <= S_WAIT_LO;
        S_WAIT_LO: if (!busy_sync[1]) begin
          state <= S_SCK_LO;
          nbits <= '0;
          cnt   <= CW'(SCK_HALF - 1);
        end
        S_SCK_LO: begin
          if (cnt == '0) begin
            shreg <= {shreg[DATA_W-2:0], sdo};
            nbits <= nbits + 1'b1;
            if (nbits == BW'(DATA_W - 1)) begin
              data  <= {shreg[DATA_W-2:0], sdo};
              valid <= 1'b1;
              state <= S_IDLE;
            end else begin
              sck   <= 1'b1;
              cnt   <= CW'(SCK_HALF - 1);
              state <= S_SCK_HI;
            end
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_SCK_HI: begin
          if (cnt == '0) begin
            sck   <= 1'b0;
            cnt   <= CW'(SCK_HALF - 1);
            state <= S_SCK_LO;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
