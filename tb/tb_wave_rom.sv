// tb_wave_rom: checks every wave_rom entry against 32767*sin(2*pi*i/DEPTH)
// computed with real arithmetic (tolerance 0.2 % of full scale), the
// quarter-period values exactly, and the one-clock read latency.
module tb_wave_rom;
  localparam int DEPTH = 1000;

  logic clk = 0;
  always #5 clk = ~clk;

  logic en = 0;
  logic [9:0] addr = 0;
  logic signed [15:0] dout;
  int checks = 0, failures = 0;
  int maxerr = 0;

  wave_rom #(.DEPTH(DEPTH)) dut (.clk, .en, .addr, .dout);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      real ref_v;
      int want, err;
      @(negedge clk); en = 1; addr = 10'(i);
      @(negedge clk); en = 0; addr = 10'((i + 500) % DEPTH);
      @(negedge clk);
      ref_v = 32767.0 * $sin(2.0 * 3.14159265358979 * i / DEPTH);
      want = int'(ref_v);
      err = int'(dout) - want;
      if (err < 0) err = -err;
      if (err > maxerr) maxerr = err;
      checks++;
      if (err > 66) begin failures++; $display("FAIL entry %0d: %0d want %0d", i, dout, want); end
      if (i == 0 || i == 250 || i == 500 || i == 750) begin
        checks++;
        if (dout != ((i == 250) ? 16'sd32767 : (i == 750) ? -16'sd32767 : 16'sd0)) begin
          failures++; $display("FAIL quarter point %0d: %0d", i, dout);
        end
      end
    end
    $display("largest deviation from the sine: %0d LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
