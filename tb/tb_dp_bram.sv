// tb_dp_bram: checks dp_bram against an array model.
//
// 4000 clocks of random reads and byte-masked writes on both ports (port B
// avoids port A's address when both write). Every read result is compared,
// one clock later, with the model's read-first value.
module tb_dp_bram;
  localparam int DEPTH = 64;
  localparam int AW = 6;

  logic clk = 0;
  always #5 clk = ~clk;

  logic a_en = 0, b_en = 0;
  logic [3:0] a_we = 0, b_we = 0;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_din = 0, b_din = 0, a_dout, b_dout;
  logic [31:0] model [DEPTH];
  logic [31:0] exp_a, exp_b;
  bit chk_a = 0, chk_b = 0;
  int checks = 0, failures = 0;

  dp_bram #(.DEPTH(DEPTH), .DATA_W(32)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (chk_a) begin checks++; if (a_dout !== exp_a) begin failures++; $display("FAIL A %h %h", a_dout, exp_a); end end
      if (chk_b) begin checks++; if (b_dout !== exp_b) begin failures++; $display("FAIL B %h %h", b_dout, exp_b); end end
      a_en = $urandom_range(0, 3) != 0;  a_we = 4'($urandom);  a_addr = AW'($urandom);  a_din = $urandom;
      b_en = $urandom_range(0, 3) != 0;  b_we = 4'($urandom);  b_addr = AW'($urandom);  b_din = $urandom;
      if (n < 200) b_we = 0;
      if (b_addr == a_addr) b_addr = b_addr + 1'b1;
      chk_a = a_en;  chk_b = b_en;
      exp_a = model[a_addr];  exp_b = model[b_addr];
      for (int b = 0; b < 4; b++) begin
        if (a_en && a_we[b]) model[a_addr][8*b +: 8] = a_din[8*b +: 8];
        if (b_en && b_we[b]) model[b_addr][8*b +: 8] = b_din[8*b +: 8];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
