// dp_bram: true dual-port block RAM with byte write enables.
//
// Two independent synchronous ports, A and B, on one clock. Each port
// writes the bytes selected by its we bits when en is high and returns the
// word stored at addr one clock after en (read-first: a write returns the
// old word). When both ports write the same byte in one clock, port B wins.
// The contents start at zero so that reads before any write are defined.
//
// In the ADC IP, port A takes samples from the two ADC interfaces (ADC0
// in bits 15:0, ADC1 in bits 31:16) and port B serves the processor's
// BRAM controller. The description calls for dual-port RAM holding 32-bit
// words; the depth of 1024 (for 1,000 samples) and the port behaviour are
// this design's choices.
module dp_bram #(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned AW     = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                a_en,
  input  logic [DATA_W/8-1:0] a_we,
  input  logic [AW-1:0]       a_addr,
  input  logic [DATA_W-1:0]   a_din,
  output logic [DATA_W-1:0]   a_dout,
  input  logic                b_en,
  input  logic [DATA_W/8-1:0] b_we,
  input  logic [AW-1:0]       b_addr,
  input  logic [DATA_W-1:0]   b_din,
  output logic [DATA_W-1:0]   b_dout
);

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_dout <= mem[a_addr];
      for (int b = 0; b < DATA_W/8; b++)
        if (a_we[b]) mem[a_addr][8*b +: 8] <= a_din[8*b +: 8];
    end
    if (b_en) begin
      b_dout <= mem[b_addr];
      for (int b = 0; b < DATA_W/8; b++)
        if (b_we[b]) mem[b_addr][8*b +: 8] <= b_din[8*b +: 8];
    end
  end

endmodule
