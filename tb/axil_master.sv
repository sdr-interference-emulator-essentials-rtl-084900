// axil_master: AXI4-Lite master model for testbenches. The testbench calls its tasks
// hierarchically: write(addr, data) and read(addr, data) each run one transaction, driving the
// request channels on the falling clock edge and waiting for the slave's handshakes.
module axil_master
  import sdr_pkg::*;
(
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);

  initial req = '0;

  task automatic write(input logic [7:0] addr, input logic [31:0] data);
    @(negedge clk);
    req.awaddr  = addr;
    req.awvalid = 1'b1;
    req.wdata   = data;
    req.wstrb   = 4'hf;
    req.wvalid  = 1'b1;
    req.bready  = 1'b1;
    do @(posedge clk); while (!(rsp.awready && rsp.wready));
    @(negedge clk);
    req.awvalid = 1'b0;
    req.wvalid  = 1'b0;
    while (!rsp.bvalid) @(negedge clk);
    @(negedge clk);
    req.bready  = 1'b0;
  endtask

  task automatic read(input logic [7:0] addr, output logic [31:0] data);
    @(negedge clk);
    req.araddr  = addr;
    req.arvalid = 1'b1;
    req.rready  = 1'b1;
    do @(posedge clk); while (!rsp.arready);
    @(negedge clk);
    req.arvalid = 1'b0;
    while (!rsp.rvalid) @(negedge clk);
    data = rsp.rdata;
    @(negedge clk);
    req.rready  = 1'b0;
  endtask

endmodule
