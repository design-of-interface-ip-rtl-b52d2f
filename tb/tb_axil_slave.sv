// tb_axil_slave: checks axil_slave with a small register array behind it.
//
// Random writes (some with the address shown before the data) and reads
// through the master model: each write must give exactly one wr_en pulse
// with the right word index, data and strobes, each read must return the
// register's value, and BVALID and RVALID must come one clock after the
// handshake.
module tb_axil_slave
  import aio_pkg::*;
;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic wr_en, rd_en;
  logic [AXI_ADDR_W-3:0] wr_idx, rd_idx;
  logic [31:0] wr_data, rd_data;
  logic [3:0] wr_strb;
  logic [31:0] regs [16];
  int wr_pulses = 0;
  int checks = 0, failures = 0;

  axil_slave dut (.clk, .rst_n, .req, .rsp, .wr_en, .wr_idx, .wr_data, .wr_strb,
                  .rd_en, .rd_idx, .rd_data);
  axil_bfm bfm (.clk, .req, .rsp);

  assign rd_data = regs[rd_idx[3:0]];
  always @(posedge clk) if (wr_en) begin
    wr_pulses++;
    for (int b = 0; b < 4; b++) if (wr_strb[b]) regs[wr_idx[3:0]][8*b +: 8] <= wr_data[8*b +: 8];
  end

  // Response timing: BVALID rises the clock after the write handshake.
  int lat_bad = 0, lat_seen = 0;
  always @(posedge clk) begin
    if (rsp.awready) begin
      @(posedge clk);
      lat_seen++;
      if (!rsp.bvalid) lat_bad++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model [16];
    logic [31:0] d;
    for (int i = 0; i < 16; i++) begin regs[i] = '0; model[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      automatic int idx = $urandom_range(0, 15);
      if ($urandom_range(0, 1)) begin
        automatic logic [31:0] v = $urandom;
        automatic logic [3:0] s = (n % 3 == 0) ? 4'($urandom) : 4'hF;
        automatic int p0 = wr_pulses;
        if (n % 5 == 0) begin s = 4'hF; bfm.write_split(12'(idx * 4), v); end
        else bfm.write(12'(idx * 4), v, s);
        for (int b = 0; b < 4; b++) if (s[b]) model[idx][8*b +: 8] = v[8*b +: 8];
        check(wr_pulses == p0 + 1, "one register write per AXI write");
      end else begin
        bfm.read(12'(idx * 4), d);
        check(d == model[idx], $sformatf("read reg %0d: %h want %h", idx, d, model[idx]));
      end
    end
    check(lat_seen > 0 && lat_bad == 0, "BVALID one clock after the write handshake");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
