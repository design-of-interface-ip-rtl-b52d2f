// ltc2664_model: behavioural model of the SPI side of an LTC2664 quad DAC
// for testbenches.
//
// While CS_n is low, SDI is shifted in on each rising SCK edge. When CS_n
// rises after exactly 24 bits, the frame {command, channel, data} acts:
// 0000 writes the input register, 0001 copies it to the DAC register,
// 0011 does both, 0100 powers the channel down. Frames of another length
// count as bad_frames. dac_reg holds the codes on the four outputs.
module ltc2664_model (
  input  logic        cs_n,
  input  logic        sck,
  input  logic        sdi,
  output logic [15:0] in_reg  [4],
  output logic [15:0] dac_reg [4],
  output logic [3:0]  powered_down,
  output int          frames,
  output int          bad_frames,
  output logic [23:0] last_frame
);

  logic [23:0] sh;
  int          nbits;

  initial begin
    for (int i = 0; i < 4; i++) begin
      in_reg[i] = 16'h8000;
      dac_reg[i] = 16'h8000;
    end
    powered_down = '0;
    frames = 0;
    bad_frames = 0;
    last_frame = '0;
    sh = '0;
    nbits = 0;
  end

  always @(negedge cs_n) nbits = 0;

  always @(posedge sck) begin
    if (!cs_n) begin
      sh = {sh[22:0], sdi};
      nbits++;
    end
  end

  always @(posedge cs_n) begin
    if (nbits == 24) begin
      automatic logic [3:0] ch = sh[19:16];
      frames++;
      last_frame = sh;
      if (ch < 4) begin
        unique case (sh[23:20])
          4'b0000: in_reg[ch[1:0]] = sh[15:0];
          4'b0001: begin dac_reg[ch[1:0]] = in_reg[ch[1:0]]; powered_down[ch[1:0]] = 1'b0; end
          4'b0011: begin in_reg[ch[1:0]] = sh[15:0]; dac_reg[ch[1:0]] = sh[15:0];
                         powered_down[ch[1:0]] = 1'b0; end
          4'b0100: powered_down[ch[1:0]] = 1'b1;
          default: ;
        endcase
      end
    end else if (nbits != 0) begin
      bad_frames++;
    end
  end

endmodule
