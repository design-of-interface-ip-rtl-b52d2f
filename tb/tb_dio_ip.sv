// tb_dio_ip: checks dio_ip with the input sequence of the interrupt timing
// example (inputs 1..3 switching, counted input 9 held and released) and
// with random input changes.
//
// After each input change the interrupt flags are compared with a model
// (either edge sets a general input's flag; release of a counted input sets
// its flag), the input state bits and the irq line are checked, flags are
// cleared by writing 1, the press time of input 10 must equal the clocks it
// was held (+/-1), and the output register must drive dout.
module tb_dio_ip
  import aio_pkg::*;
;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic [9:0] din = '0;
  logic [7:0] dout;
  logic irq;
  logic [9:0] mflags = '0;
  int checks = 0, failures = 0;

  dio_ip dut (.clk, .rst_n, .s_axi_req(req), .s_axi_rsp(rsp), .din, .dout, .irq);
  axil_bfm bfm (.clk, .req, .rsp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Change the inputs, update the flag model, let the synchroniser settle.
  task automatic set_in(input logic [9:0] v);
    logic [9:0] old = din;
    @(negedge clk);
    din = v;
    mflags[7:0] |= (old[7:0] ^ v[7:0]);
    mflags[9:8] |= (old[9:8] & ~v[9:8]);
    repeat (4) @(negedge clk);
  endtask

  task automatic check_reg(input string tag);
    logic [31:0] d;
    bfm.read(12'h0, d);
    check(d[25:16] == mflags, $sformatf("%s: flags %b want %b", tag, d[25:16], mflags));
    check(d[7:0] == din[7:0], $sformatf("%s: input state %h want %h", tag, d[7:0], din[7:0]));
    check(irq == (mflags != 0), $sformatf("%s: irq %b", tag, irq));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int edges_seen = 0, count_irqs = 0;
  always @(posedge clk) begin
    edges_seen += $countones(dut.event_set[7:0]);
    count_irqs += $countones(dut.event_set[9:8]);
  end

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(irq == 0, "no interrupt after reset");

    // Interrupt timing example: In9 rises, In1 rises, In2 rises, In9 falls,
    // In1 falls, In2 falls, In3 pulses.
    set_in(10'b01_0000_0000);                     // In9 on
    set_in(10'b01_0000_0001);         // In1 on
    check_reg("In1 on");
    bfm.write(12'h0, 32'h0001_0000);  mflags[0] = 0;   // clear flag 1
    set_in(10'b01_0000_0011);         // In2 on
    repeat (17) @(negedge clk);
    set_in(10'b00_0000_0011);                     // In9 off: count saved
    check_reg("In9 off");
    bfm.read(12'h4, d);
    check(d > 17, $sformatf("input 9 press time %0d clocks", d));
    check(mflags[8] == 1, "release of input 9 raised its flag");
    bfm.write(12'h0, 32'h03FF_0000);  mflags = 0;
    check_reg("all cleared");
    set_in(10'b00_0000_0010);                     // In1 off
    set_in(10'b00_0000_0000);                     // In2 off
    set_in(10'b00_0000_0100);                     // In3 on
    set_in(10'b00_0000_0000);                     // In3 off
    check_reg("In1/In2/In3 edges");
    bfm.write(12'h0, 32'h03FF_0000);  mflags = 0;

    // Exact press time on input 10.
    @(negedge clk); din[9] = 1'b1;
    repeat (123) @(negedge clk);
    din[9] = 1'b0;  mflags[9] = 1'b1;
    repeat (4) @(negedge clk);
    bfm.read(12'h8, d);
    check(d >= 122 && d <= 124, $sformatf("input 10 press time %0d, want 123", d));
    check_reg("input 10 released");
    bfm.write(12'h0, 32'h03FF_0000);  mflags = 0;

    // Random input changes.
    for (int n = 0; n < 60; n++) begin
      set_in(10'($urandom));
      check_reg($sformatf("random %0d", n));
      if (n % 4 == 3) begin
        automatic logic [9:0] c = 10'($urandom);
        bfm.write(12'h0, {6'h0, c, 16'h0});
        mflags &= ~c;
      end
    end

    // Output register; clearing with 0s leaves flags alone.
    bfm.write(12'h0, 32'h0000_A500);
    check(dout == 8'hA5, $sformatf("dout %h", dout));
    bfm.read(12'h0, d);
    check(d[15:8] == 8'hA5 && d[25:16] == mflags, "output read-back, flags kept");
    check(edges_seen > 0 && count_irqs >= 2, "edge and count interrupts both occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
