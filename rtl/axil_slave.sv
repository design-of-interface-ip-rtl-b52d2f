// axil_slave: AXI4-Lite slave front end used by every IP's register map.
//
// A write is accepted when AWVALID and WVALID are both high and no write
// response is pending; for that one cycle wr_en is high with wr_idx (the
// 32-bit word index, AWADDR[ADDR_W-1:2]), wr_data and wr_strb, and BVALID
// (OKAY) follows in the next cycle. A read is accepted when ARVALID is high
// and no read data is pending; rd_en pulses with rd_idx and the IP's
// combinational rd_data is registered into RDATA, valid in the next cycle.
// One transaction of each kind is outstanding at a time.
//
// The bus is AXI as in the design description; the single-outstanding,
// one-cycle-latency slave is this design's own choice.
module axil_slave
  import aio_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  axil_req_t             req,
  output axil_rsp_t             rsp,
  // register side
  output logic                  wr_en,
  output logic [AXI_ADDR_W-3:0] wr_idx,
  output logic [31:0]           wr_data,
  output logic [3:0]            wr_strb,
  output logic                  rd_en,
  output logic [AXI_ADDR_W-3:0] rd_idx,
  input  logic [31:0]           rd_data
);

  logic bvalid_q, rvalid_q;
  logic [31:0] rdata_q;

  assign wr_en   = req.awvalid && req.wvalid && !bvalid_q;
  assign wr_idx  = req.awaddr[AXI_ADDR_W-1:2];
  assign wr_data = req.wdata;
  assign wr_strb = req.wstrb;
  assign rd_en   = req.arvalid && !rvalid_q;
  assign rd_idx  = req.araddr[AXI_ADDR_W-1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid_q <= 1'b0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      if (wr_en)                      bvalid_q <= 1'b1;
      else if (bvalid_q && req.bready) bvalid_q <= 1'b0;
      if (rd_en) begin
        rvalid_q <= 1'b1;
        rdata_q  <= rd_data;
      end else if (rvalid_q && req.rready) begin
        rvalid_q <= 1'b0;
      end
    end
  end

  always_comb begin
    rsp         = '0;
    rsp.awready = wr_en;
    rsp.wready  = wr_en;
    rsp.bvalid  = bvalid_q;
    rsp.bresp   = 2'b00;
    rsp.arready = rd_en;
    rsp.rvalid  = rvalid_q;
    rsp.rdata   = rdata_q;
    rsp.rresp   = 2'b00;
  end

  // AXI rule: a VALID stays high, with its payload, until the handshake.
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    req.awvalid && !rsp.awready |=> req.awvalid && $stable(req.awaddr));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    req.wvalid && !rsp.wready |=> req.wvalid && $stable(req.wdata));
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    req.arvalid && !rsp.arready |=> req.arvalid && $stable(req.araddr));

endmodule
