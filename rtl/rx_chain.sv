// rx_chain: receive baseband processing, from the ADC sample stream to the DMA stream.
//
// The path, in order: an input FIFO that carries the ADC samples from the ADC clock into the
// DSP clock clk2x (adc_axis_sync); a complex multiplier that shifts the frequency, fed either
// by the DDS or by a constant (multiplexer "MPX DDS", DDS enable); a CIC decimator of rate
// 4..128 that can be bypassed (MPX0, CIC enable); FIR0; FIR1, which can be bypassed (MPX1,
// FIR1 enable); the downsampler by R; the packetizer; and an output FIFO into clk, the clock of
// the DMA stream. All settings come from the chain's AXI-Lite register block, clocked by clk2x.
// Every stage passes samples with valid/ready, so a stalled DMA fills the FIFOs back to the
// input; the ADC cannot be stalled, so samples arriving at a full input FIFO are lost and
// counted (status register, low 16 bits; the count is kept in the ADC clock and is only a
// diagnostic). Timing: about three clocks per FIFO, two for the mixer, one for each other
// stage. The order of the stages, the bypasses and the clock domains follow the document's
// RX block scheme; the handshakes, FIFO depths and the bypass of FIR1 under a control bit are
// this design's choices. clk2d is part of the document's port list but nothing here uses it.
// arstn is an asynchronous active-low reset whose release the caller synchronises.
module rx_chain
  import sdr_pkg::*;
#(
  parameter int unsigned FIR0_TAPS = 32,
  parameter int unsigned FIR1_TAPS = 32,
  parameter int unsigned CIC_STAGES = 4,
  parameter int unsigned PKT_LEN   = 1024,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk2d,
  input  logic        clk,
  input  logic        clk2x,
  input  logic        arstn,
  // control
  input  axil_req_t   axi_req,
  output axil_rsp_t   axi_rsp,
  // ADC sample stream (ADC clock domain, cannot be stalled)
  input  logic        adc_aclk,
  input  logic        adc_tvalid,
  input  iq_t         adc_tdata,
  // DMA stream (clk domain)
  output logic        rx_dma_tvalid,
  input  logic        rx_dma_tready,
  output logic [31:0] rx_dma_tdata,
  output logic        rx_dma_tlast
);

  // ---- control ----
  logic [31:0] dds_pinc;
  logic        dds_en, cic_en, fir1_en;
  iq_t         const_iq;
  logic [7:0]  cic_rate;
  logic        fir0_cfg, fir0_rld, fir1_cfg, fir1_rld, rate_wr;
  logic [15:0] rld_data, rate_factor, in_ovf;

  chain_ctrl_axi u_ctrl (
    .clk(clk2x), .rst_n(arstn), .axi_req, .axi_rsp,
    .dds_pinc, .dds_en, .const_iq, .cic_rate, .cic_en,
    .fir0_cfg, .fir0_rld_valid(fir0_rld), .fir1_cfg, .fir1_rld_valid(fir1_rld),
    .fir_rld_data(rld_data), .fir1_en, .rate_factor, .rate_wr,
    .status({16'd0, in_ovf})
  );

  // ---- adc_axis_sync: ADC clock -> clk2x ----
  logic s_valid, s_ready;
  iq_t  s_data;
  logic adc_wr_ready;

  async_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_adc_sync (
    .wr_clk(adc_aclk), .wr_rst_n(arstn), .wr_valid(adc_tvalid), .wr_ready(adc_wr_ready),
    .wr_data(adc_tdata), .wr_overflow(in_ovf),
    .rd_clk(clk2x), .rd_rst_n(arstn), .rd_valid(s_valid), .rd_ready(s_ready), .rd_data(s_data)
  );

  // ---- frequency shift: DDS or constant into the complex multiplier ----
  iq_t  osc, dds_out;
  logic mix_valid, mix_ready;
  iq_t  mix_data;
  logic [31:0] dds_phase;

  dds u_dds (
    .clk(clk2x), .rst_n(arstn), .pinc(dds_pinc), .step(dds_en && s_valid && s_ready),
    .out(dds_out), .phase(dds_phase)
  );

  assign osc = dds_en ? dds_out : const_iq;

  cmpy u_cmpy (
    .clk(clk2x), .rst_n(arstn), .in_valid(s_valid), .in_ready(s_ready), .a(s_data), .b(osc),
    .out_valid(mix_valid), .out_ready(mix_ready), .out(mix_data)
  );

  // ---- CIC decimator with bypass (MPX0) ----
  logic cic_in_ready, cic_valid, m0_valid, m0_ready;
  iq_t  cic_data, m0_data;

  cic_decim #(.N_STAGES(CIC_STAGES)) u_cic (
    .clk(clk2x), .rst_n(arstn), .rate(cic_rate),
    .in_valid(cic_en && mix_valid), .in_ready(cic_in_ready), .in(mix_data),
    .out_valid(cic_valid), .out_ready(cic_en && m0_ready), .out(cic_data)
  );

  assign mix_ready = cic_en ? cic_in_ready : m0_ready;
  assign m0_valid  = cic_en ? cic_valid : mix_valid;
  assign m0_data   = cic_en ? cic_data  : mix_data;

  // ---- FIR0, FIR1 with bypass (MPX1) ----
  logic f0_valid, f0_ready, f1_in_ready, f1_valid, m1_valid, m1_ready;
  iq_t  f0_data, f1_data, m1_data;

  fir #(.N_TAPS(FIR0_TAPS)) u_fir0 (
    .clk(clk2x), .rst_n(arstn), .rld_valid(fir0_rld), .rld_data(rld_data), .cfg_valid(fir0_cfg),
    .in_valid(m0_valid), .in_ready(m0_ready), .in(m0_data),
    .out_valid(f0_valid), .out_ready(f0_ready), .out(f0_data)
  );

  fir #(.N_TAPS(FIR1_TAPS)) u_fir1 (
    .clk(clk2x), .rst_n(arstn), .rld_valid(fir1_rld), .rld_data(rld_data), .cfg_valid(fir1_cfg),
    .in_valid(fir1_en && f0_valid), .in_ready(f1_in_ready), .in(f0_data),
    .out_valid(f1_valid), .out_ready(fir1_en && m1_ready), .out(f1_data)
  );

  assign f0_ready = fir1_en ? f1_in_ready : m1_ready;
  assign m1_valid = fir1_en ? f1_valid : f0_valid;
  assign m1_data  = fir1_en ? f1_data  : f0_data;

  // ---- downsampler, packetizer ----
  logic d_valid, d_ready;
  iq_t  d_data;

  downsampler u_down (
    .clk(clk2x), .rst_n(arstn), .factor(rate_factor), .factor_wr(rate_wr),
    .in_valid(m1_valid), .in_ready(m1_ready), .in(m1_data),
    .out_valid(d_valid), .out_ready(d_ready), .out(d_data)
  );

  logic        p_valid, p_ready, p_last;
  logic [31:0] p_data;

  packetizer #(.PKT_LEN(PKT_LEN)) u_pkt (
    .clk(clk2x), .rst_n(arstn), .in_valid(d_valid), .in_ready(d_ready), .in(d_data),
    .m_valid(p_valid), .m_ready(p_ready), .m_data(p_data), .m_last(p_last)
  );

  // ---- clk2x -> clk (DMA) ----
  logic [15:0] out_ovf;

  async_fifo #(.WIDTH(33), .DEPTH(FIFO_DEPTH)) u_dma_sync (
    .wr_clk(clk2x), .wr_rst_n(arstn), .wr_valid(p_valid), .wr_ready(p_ready),
    .wr_data({p_last, p_data}), .wr_overflow(out_ovf),
    .rd_clk(clk), .rd_rst_n(arstn), .rd_valid(rx_dma_tvalid), .rd_ready(rx_dma_tready),
    .rd_data({rx_dma_tlast, rx_dma_tdata})
  );

endmodule
