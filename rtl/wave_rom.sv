// wave_rom: one period of a sine wave for the DAC IP's waveform modes.
//
// DEPTH signed 16-bit entries, entry i = round(32767 * sin(2*pi*i/DEPTH))
// to within about 0.2 % of full scale, computed at elaboration with
// Bhaskara's rational approximation (integer arithmetic only): with
// H = DEPTH/2 and t = i mod H, s = 16*t*(H-t) / (5*H*H - 4*t*(H-t)),
// negated for the second half period. The read is synchronous: dout shows
// the entry at addr one clock after en.
//
// The description says that waveform data sits in a ROM/BRAM and is read
// at mode-dependent addresses; the table length and its contents (one sine
// period) are this design's choice, made to reproduce the sine outputs
// shown for the DAC modes.
module wave_rom #(
  parameter int unsigned DEPTH = 1000,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               en,
  input  logic [AW-1:0]      addr,
  output logic signed [15:0] dout
);

  logic signed [15:0] rom [DEPTH];

  function automatic logic signed [15:0] sine_entry(input int unsigned i);
    longint h, t, num, den, v;
    h   = longint'(DEPTH) / 2;
    t   = longint'(i) % h;
    num = 16 * t * (h - t);
    den = 5 * h * h - 4 * t * (h - t);
    v   = (num * 32767 * 2 + den) / (2 * den);
    if (longint'(i) >= h) v = -v;
    return 16'(v);
  endfunction

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) rom[i] = sine_entry(i);
  end

  always_ff @(posedge clk) begin
    if (en) dout <= rom[addr];
  end

endmodule
