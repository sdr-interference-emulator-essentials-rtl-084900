// chain_ctrl_axi: AXI4-Lite control registers of the RX and the TX chain (one instance in
// each chain, the rx_chain_ctrl_axi and tx_chain_ctrl_axi of the design).
//
// It holds the settings the processor writes: the DDS phase increment, the CIC rate and the
// CIC enable (CIC in the path or bypassed), the FIR0 and FIR1 control and reload ports, the
// downsampler or upsampler factor, the DDS enable (DDS or constant as the mixer's second
// input) and the constant itself. A write to a reload register produces a one-clock
// rld_valid pulse carrying the coefficient; a write to a control register produces a
// one-clock cfg pulse that applies the reloaded set, and FIR1's control register also holds
// the FIR1 enable in bit 0. Writing the rate factor pulses rate_wr. Every register reads back;
// the status register returns the chain's overflow/underflow counter. Offsets are in
// sdr_pkg. The list of settings follows the document's table of configurable modules; the
// offsets, reset values, the constant register and the FIR1 enable bit are this design's own.
// Reset values: DDS off, constant 0x7FFF + j0 (gain of about one), CIC off at rate 4, FIR1 on,
// factor 1, so a reset chain passes samples through its FIRs only.
module chain_ctrl_axi
  import sdr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   axi_req,
  output axil_rsp_t   axi_rsp,
  output logic [31:0] dds_pinc,
  output logic        dds_en,
  output iq_t         const_iq,
  output logic [7:0]  cic_rate,
  output logic        cic_en,
  output logic        fir0_cfg,
  output logic        fir0_rld_valid,
  output logic        fir1_cfg,
  output logic        fir1_rld_valid,
  output logic [15:0] fir_rld_data,
  output logic        fir1_en,
  output logic [15:0] rate_factor,
  output logic        rate_wr,
  input  logic [31:0] status
);

  logic                wr_en, rd_en;
  logic [AXIL_AW-1:0]  wr_addr, rd_addr;
  logic [AXIL_DW-1:0]  wr_data, rd_data;
  logic [3:0]          wr_strb;

  axil_slave u_axil (
    .clk, .rst_n, .req(axi_req), .rsp(axi_rsp),
    .wr_en, .wr_addr, .wr_data, .wr_strb, .rd_en, .rd_addr, .rd_data
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dds_pinc       <= '0;
      dds_en         <= 1'b0;
      const_iq       <= '{q: 16'sd0, i: 16'sh7fff};
      cic_rate       <= 8'd4;
      cic_en         <= 1'b0;
      fir0_cfg       <= 1'b0;
      fir1_cfg       <= 1'b0;
      fir0_rld_valid <= 1'b0;
      fir1_rld_valid <= 1'b0;
      fir_rld_data   <= '0;
      fir1_en        <= 1'b1;
      rate_factor    <= 16'd1;
      rate_wr        <= 1'b0;
    end else begin
      fir0_cfg       <= 1'b0;
      fir1_cfg       <= 1'b0;
      fir0_rld_valid <= 1'b0;
      fir1_rld_valid <= 1'b0;
      rate_wr        <= 1'b0;
      if (wr_en) begin
        unique case (wr_addr)
          CH_REG_DDS_PINC: dds_pinc <= wr_data;
          CH_REG_CIC_RATE: cic_rate <= wr_data[7:0];
          CH_REG_FIR0_CFG: fir0_cfg <= 1'b1;
          CH_REG_FIR0_RLD: begin fir0_rld_valid <= 1'b1; fir_rld_data <= wr_data[15:0]; end
          CH_REG_FIR1_CFG: begin fir1_cfg <= 1'b1; fir1_en <= wr_data[0]; end
          CH_REG_FIR1_RLD: begin fir1_rld_valid <= 1'b1; fir_rld_data <= wr_data[15:0]; end
          CH_REG_RATE:     begin rate_factor <= wr_data[15:0]; rate_wr <= 1'b1; end
          CH_REG_DDS_EN:   dds_en <= wr_data[0];
          CH_REG_CIC_EN:   cic_en <= wr_data[0];
          CH_REG_CONST:    const_iq <= wr_data;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (rd_addr)
      CH_REG_DDS_PINC: rd_data = dds_pinc;
      CH_REG_CIC_RATE: rd_data = {24'd0, cic_rate};
      CH_REG_FIR1_CFG: rd_data = {31'd0, fir1_en};
      CH_REG_RATE:     rd_data = {16'd0, rate_factor};
      CH_REG_DDS_EN:   rd_data = {31'd0, dds_en};
      CH_REG_CIC_EN:   rd_data = {31'd0, cic_en};
      CH_REG_CONST:    rd_data = const_iq;
      CH_REG_STATUS:   rd_data = status;
      default:         rd_data = '0;
    endcase
  end

endmodule
