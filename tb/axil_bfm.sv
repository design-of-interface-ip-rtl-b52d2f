// axil_bfm: AXI4-Lite master model for testbenches (stands in for the
// processor). write() and read() each run one transaction and wait for the
// response; both present address and data together, with VALID held until
// the slave accepts. write_split() shows the address two clocks before the
// data. Signals change on the falling clock edge.
module axil_bfm
  import aio_pkg::*;
(
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);

  initial req = '0;

  task automatic write(input logic [AXI_ADDR_W-1:0] addr, input logic [31:0] data,
                       input logic [3:0] strb = 4'hF);
    @(negedge clk);
    req.awaddr  = addr;  req.awvalid = 1'b1;
    req.wdata   = data;  req.wstrb   = strb;  req.wvalid = 1'b1;
    req.bready  = 1'b1;
    do @(posedge clk); while (!rsp.awready);
    @(negedge clk);
    req.awvalid = 1'b0;  req.wvalid = 1'b0;
    while (!rsp.bvalid) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    req.bready = 1'b0;
  endtask

  task automatic write_split(input logic [AXI_ADDR_W-1:0] addr, input logic [31:0] data);
    @(negedge clk);
    req.awaddr = addr;  req.awvalid = 1'b1;  req.bready = 1'b1;
    repeat (2) @(negedge clk);
    req.wdata = data;  req.wstrb = 4'hF;  req.wvalid = 1'b1;
    do @(posedge clk); while (!rsp.awready);
    @(negedge clk);
    req.awvalid = 1'b0;  req.wvalid = 1'b0;
    while (!rsp.bvalid) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    req.bready = 1'b0;
  endtask

  task automatic read(input logic [AXI_ADDR_W-1:0] addr, output logic [31:0] data);
    @(negedge clk);
    req.araddr = addr;  req.arvalid = 1'b1;  req.rready = 1'b1;
    do @(posedge clk); while (!rsp.arready);
    @(negedge clk);
    req.arvalid = 1'b0;
    while (!rsp.rvalid) @(negedge clk);
    data = rsp.rdata;
    @(posedge clk);
    @(negedge clk);
    req.rready = 1'b0;
  endtask

endmodule
