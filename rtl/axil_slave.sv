// axil_slave: minimal AXI4-Lite slave front end shared by the control-register blocks.
//
// A write is accepted in the cycle where both the address and the data channel are valid and
// no write response is outstanding; that cycle raises wr_en for one clock with the address,
// data and byte strobes, and the OKAY response follows on the B channel in the next cycle.
// A read is accepted when no read data is outstanding; rd_addr shows the read address in the
// accepting cycle, the parent returns rd_data combinationally, and the value is registered
// onto the R channel one cycle later. Responses are always OKAY. The single-beat, no-outstanding
// behaviour is this design's own choice; the document only says that control runs over AXI-Lite.
module axil_slave
  import sdr_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  axil_req_t           req,
  output axil_rsp_t           rsp,
  output logic                wr_en,
  output logic [AXIL_AW-1:0]  wr_addr,
  output logic [AXIL_DW-1:0]  wr_data,
  output logic [3:0]          wr_strb,
  output logic                rd_en,
  output logic [AXIL_AW-1:0]  rd_addr,
  input  logic [AXIL_DW-1:0]  rd_data
);

  logic bvalid_q, rvalid_q;
  logic [AXIL_DW-1:0] rdata_q;

  assign wr_en   = req.awvalid && req.wvalid && !bvalid_q;
  assign wr_addr = req.awaddr;
  assign wr_data = req.wdata;
  assign wr_strb = req.wstrb;
  assign rd_en   = req.arvalid && !rvalid_q;
  assign rd_addr = req.araddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid_q <= 1'b0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      if (wr_en)                       bvalid_q <= 1'b1;
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

  // AXI rule for the master: a read or write request that was not accepted stays valid and
  // unchanged until it is.
  logic               ar_wait_q, aw_wait_q;
  logic [AXIL_AW-1:0] araddr_q, awaddr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ar_wait_q <= 1'b0;
      aw_wait_q <= 1'b0;
      araddr_q  <= '0;
      awaddr_q  <= '0;
    end else begin
      ar_wait_q <= req.arvalid && !rd_en;
      aw_wait_q <= req.awvalid && !wr_en;
      araddr_q  <= req.araddr;
      awaddr_q  <= req.awaddr;
      if (ar_wait_q)
        assert (req.arvalid && req.araddr == araddr_q) else $error("AXI-Lite read request dropped or changed before it was accepted");
      if (aw_wait_q)
        assert (req.awvalid && req.awaddr == awaddr_q) else $error("AXI-Lite write request dropped or changed before it was accepted");
    end
  end

endmodule
