// ltc2328_model: behavioural model of an LTC2328-16 SAR ADC for testbenches.
//
// A rising CNV samples the input code and raises BUSY for CONV_CLKS clocks.
// When BUSY falls the MSB is on SDO; each rising SCK edge moves SDO to the
// next bit. The input is the ideal two's-complement code (3200 LSB per volt
// for the +/-10.24 V range); conversions counts finished conversions.
module ltc2328_model #(
  parameter int unsigned CONV_CLKS = 50
) (
  input  logic               clk,
  input  logic signed [15:0] code,
  input  logic               cnv,
  output logic               busy,
  input  logic               sck,
  output logic               sdo,
  output int                 conversions
);

  logic [15:0] shreg;

  initial begin
    busy = 1'b0;
    sdo = 1'b0;
    shreg = '0;
    conversions = 0;
  end

  always @(posedge cnv) begin
    shreg = code;
    busy  = 1'b1;
    repeat (CONV_CLKS) @(posedge clk);
    busy  = 1'b0;
    sdo   = shreg[15];
    conversions++;
  end

  always @(posedge sck) begin
    if (!busy) begin
      shreg = {shreg[14:0], 1'b0};
      sdo   = shreg[15];
    end
  end

endmodule
