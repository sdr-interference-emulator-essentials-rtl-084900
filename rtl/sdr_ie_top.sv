// sdr_ie_top: FPGA top level of the SDR interference emulator.
//
// Four groups of blocks, wired as on the board's FPGA:
//  * clocking, trigger and sync: clock_system turns the ADC's data clock into clk500, clk250
//    (the ADC sample clock), clk125 and clk125_ref with a programmable phase; sync_rst makes
//    rst250 from the MMCM's locked flag (asynchronous set, release on clk250); trigger_system
//    turns the processor's enable into simultaneous ADC and DAC data enables.
//  * RX: adc captures and deserialises the two QDR LVDS ADC channels into an I/Q stream on
//    clk250; rx_chain mixes, decimates and filters it and hands {Q, I} packets to the DMA.
//  * TX: tx_chain takes {Q, I} words from the DMA, interpolates, filters and mixes them;
//    dac puts the result on the DAC's interleaved LVDS bus at 500 Mwords/s.
//  * The processor side (processing system, AXI interconnects, DMA engine, SPI/I2C/GPIO) is
//    vendor IP and is outside this module: its clocks (clk2d, clk, clk2x), its DSP reset
//    rstn_dsp, the trigger enable, adc_sample_period, the four AXI-Lite control buses and the
//    two DMA streams are ports.
// Clock domains of the ports: adc_ctrl_axi on adc_clk (clk250, given out for the interconnect's
// clock converter); drp_mmcm_axi, rx_dma_* and tx_dma_* on clk; rx_chain_axi and tx_chain_axi
// on clk2x. The DAC-side reset is rst250; the DAC uses it as an asynchronous reset in clk500
// and clk125 while the ADC uses it synchronously in clk250 (lint notes a reset used both
// ways; it is released on a clk250 edge, which is also a clk500 rising edge). The block set
// and their connections follow the document's top-level figure; port names of the processor
// side, the clock of each control bus and the reset of the DAC are this design's choices.
module sdr_ie_top
  import sdr_pkg::*;
(
  // ---- ADC pins ----
  input  logic        ADC_A_DCLK_P,
  input  logic        ADC_A_DCLK_N,
  input  logic        ADC_B_DCLK_P,
  input  logic        ADC_B_DCLK_N,
  input  logic [3:0]  ADC_A_D_P,
  input  logic [3:0]  ADC_A_D_N,
  input  logic        ADC_A_FRAME_P,
  input  logic        ADC_A_FRAME_N,
  input  logic [3:0]  ADC_B_D_P,
  input  logic [3:0]  ADC_B_D_N,
  input  logic        ADC_B_FRAME_P,
  input  logic        ADC_B_FRAME_N,
  input  logic        ADC_CTRL_OVRA,
  input  logic        ADC_CTRL_OVRB,
  output logic        ADC_SYNC_P,
  output logic        ADC_SYNC_N,
  // ---- DAC pins ----
  output logic [15:0] DAC_D_P,
  output logic [15:0] DAC_D_N,
  output logic        DAC_DCI_P,
  output logic        DAC_DCI_N,
  output logic        DAC_FRAME_P,
  output logic        DAC_FRAME_N,
  // ---- processor side ----
  input  logic        clk2d,
  input  logic        clk,
  input  logic        clk2x,
  input  logic        rstn_dsp,
  input  logic        mmcm_rst,
  input  logic        ena_adc_dac_data,
  input  logic [15:0] adc_sample_period,
  output logic        adc_clk,
  output logic        mmcm_locked,
  input  axil_req_t   adc_ctrl_axi_req,
  output axil_rsp_t   adc_ctrl_axi_rsp,
  input  axil_req_t   drp_mmcm_axi_req,
  output axil_rsp_t   drp_mmcm_axi_rsp,
  input  axil_req_t   rx_chain_axi_req,
  output axil_rsp_t   rx_chain_axi_rsp,
  input  axil_req_t   tx_chain_axi_req,
  output axil_rsp_t   tx_chain_axi_rsp,
  output logic        rx_dma_tvalid,
  input  logic        rx_dma_tready,
  output logic [31:0] rx_dma_tdata,
  output logic        rx_dma_tlast,
  input  logic        tx_dma_tvalid,
  output logic        tx_dma_tready,
  input  logic [31:0] tx_dma_tdata,
  // ---- DAC idle sample and development checker ----
  input  sample_t     dac_idle_i,
  input  sample_t     dac_idle_q,
  input  logic        dac_chk_ramp,
  output logic [31:0] dac_chk_samples,
  output logic [15:0] dac_chk_gaps,
  output logic [15:0] dac_chk_seq_err
);

  // ---- clocking, trigger and sync ----
  logic clk500, clk250, clk125, clk125_ref, locked;
  logic rst250, rstn250;
  logic adc_data_ena, dac_data_ena;

  clock_system clock_system_inst (
    .ADC_A_DCLK_P, .ADC_A_DCLK_N, .ADC_B_DCLK_P, .ADC_B_DCLK_N,
    .rst(mmcm_rst), .axi_clk(clk), .axi_rst_n(rstn_dsp),
    .drp_mmcm_axi_req, .drp_mmcm_axi_rsp,
    .clk500, .clk250, .clk125, .clk125_ref, .locked
  );

  sync_rst sync_rst250 (.clk(clk250), .arst(!locked), .rst_o(rst250), .rstn_o(rstn250));

  trigger_system trigger_system_instance (
    .clk125, .ena_in(ena_adc_dac_data), .dac_data_ena, .adc_data_ena
  );

  assign adc_clk     = clk250;
  assign mmcm_locked = locked;

  // ---- RX ----
  logic       adc_tvalid;
  iq_t        adc_tdata;
  logic [1:0] adc_tuser;

  adc adc_inst (
    .clk500, .clk250, .rst250, .clk_invalid(rst250), .adc_data_ena, .adc_sample_period,
    .axi_req(adc_ctrl_axi_req), .axi_rsp(adc_ctrl_axi_rsp),
    .ADC_A_D_P, .ADC_A_D_N, .ADC_A_FRAME_P, .ADC_A_FRAME_N,
    .ADC_B_D_P, .ADC_B_D_N, .ADC_B_FRAME_P, .ADC_B_FRAME_N,
    .ADC_CTRL_OVRA, .ADC_CTRL_OVRB, .ADC_SYNC_P, .ADC_SYNC_N,
    .adc_tvalid, .adc_tdata, .adc_tuser
  );

  rx_chain rx_chain_inst (
    .clk2d, .clk, .clk2x, .arstn(rstn_dsp),
    .axi_req(rx_chain_axi_req), .axi_rsp(rx_chain_axi_rsp),
    .adc_aclk(clk250), .adc_tvalid, .adc_tdata,
    .rx_dma_tvalid, .rx_dma_tready, .rx_dma_tdata, .rx_dma_tlast
  );

  // ---- TX ----
  logic dac_tvalid, dac_tready;
  iq_t  dac_tdata;

  tx_chain tx_chain_inst (
    .clk2d, .clk, .clk2x, .arstn(rstn_dsp),
    .axi_req(tx_chain_axi_req), .axi_rsp(tx_chain_axi_rsp),
    .tx_dma_tvalid, .tx_dma_tready, .tx_dma_tdata,
    .dac_tvalid, .dac_tready, .dac_tdata
  );

  dac dac_inst (
    .clk500, .clk125, .rst(rst250), .dac_data_ena,
    .dac_aclk(clk), .dac_tvalid, .dac_tready, .dac_tdata,
    .I(dac_idle_i), .Q(dac_idle_q), .chk_ramp(dac_chk_ramp),
    .chk_samples(dac_chk_samples), .chk_gaps(dac_chk_gaps), .chk_seq_err(dac_chk_seq_err),
    .DAC_D_P, .DAC_D_N, .DAC_DCI_P, .DAC_DCI_N, .DAC_FRAME_P, .DAC_FRAME_N
  );

endmodule
