// tx_chain: transmit baseband processing, from the DMA stream to the DAC sample stream.
//
// The path mirrors the receive chain. Samples from the DMA ({Q, I} words, clk domain) are
// raised in rate by the upsampler (factor U, zero stuffing), cross into the 500 MHz DSP clock
// clk2x through a FIFO, pass FIR1 (which can be bypassed, MPX1, FIR1 enable) and FIR0, then
// the CIC interpolator of rate 4..128 (bypassed by MPX0 when the CIC is disabled), are shifted
// in frequency by the complex multiplier fed by the DDS or a constant (MPX DDS), and cross back
// into clk through a second FIFO onto the DAC stream. All settings come from the chain's
// AXI-Lite register block in clk2x; the upsampling factor is used in clk and is meant to be
// changed only while the chain is idle. The chain is pulled by the DAC: every stage passes
// samples with valid/ready, so the consumer's rate sets the flow. The status register counts
// samples written towards the DAC (clk2x). The order of the stages, the bypasses and the clock
// domains follow the document's TX block scheme; handshakes, FIFO depths and the FIR1 bypass
// bit are this design's choices. clk2d is in the document's port list but unused here. arstn
// is an asynchronous active-low reset whose release the caller synchronises.
module tx_chain
  import sdr_pkg::*;
#(
  parameter int unsigned FIR0_TAPS  = 32,
  parameter int unsigned FIR1_TAPS  = 32,
  parameter int unsigned CIC_STAGES = 4,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk2d,
  input  logic        clk,
  input  logic        clk2x,
  input  logic        arstn,
  // control
  input  axil_req_t   axi_req,
  output axil_rsp_t   axi_rsp,
  // DMA stream (clk domain)
  input  logic        tx_dma_tvalid,
  output logic        tx_dma_tready,
  input  logic [31:0] tx_dma_tdata,
  // DAC sample stream (clk domain)
  output logic        dac_tvalid,
  input  logic        dac_tready,
  output iq_t         dac_tdata
);

  // ---- control ----
  logic [31:0] dds_pinc;
  logic        dds_en, cic_en, fir1_en;
  iq_t         const_iq;
  logic [7:0]  cic_rate;
  logic        fir0_cfg, fir0_rld, fir1_cfg, fir1_rld, rate_wr;
  logic [15:0] rld_data, rate_factor;
  logic [31:0] sent;

  chain_ctrl_axi u_ctrl (
    .clk(clk2x), .rst_n(arstn), .axi_req, .axi_rsp,
    .dds_pinc, .dds_en, .const_iq, .cic_rate, .cic_en,
    .fir0_cfg, .fir0_rld_valid(fir0_rld), .fir1_cfg, .fir1_rld_valid(fir1_rld),
    .fir_rld_data(rld_data), .fir1_en, .rate_factor, .rate_wr,
    .status(sent)
  );

  // ---- upsampler (clk) ----
  logic u_valid, u_ready;
  iq_t  u_data;

  upsampler u_up (
    .clk, .rst_n(arstn), .factor(rate_factor),
    .in_valid(tx_dma_tvalid), .in_ready(tx_dma_tready), .in(tx_dma_tdata),
    .out_valid(u_valid), .out_ready(u_ready), .out(u_data)
  );

  // ---- clk -> clk2x ----
  logic s_valid, s_ready;
  iq_t  s_data;
  logic [15:0] in_ovf;

  async_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_in_sync (
    .wr_clk(clk), .wr_rst_n(arstn), .wr_valid(u_valid), .wr_ready(u_ready),
    .wr_data(u_data), .wr_overflow(in_ovf),
    .rd_clk(clk2x), .rd_rst_n(arstn), .rd_valid(s_valid), .rd_ready(s_ready), .rd_data(s_data)
  );

  // ---- FIR1 with bypass (MPX1), FIR0 ----
  logic f1_in_ready, f1_valid, m1_valid, m1_ready;
  iq_t  f1_data, m1_data;

  fir #(.N_TAPS(FIR1_TAPS)) u_fir1 (
    .clk(clk2x), .rst_n(arstn), .rld_valid(fir1_rld), .rld_data(rld_data), .cfg_valid(fir1_cfg),
    .in_valid(fir1_en && s_valid), .in_ready(f1_in_ready), .in(s_data),
    .out_valid(f1_valid), .out_ready(fir1_en && m1_ready), .out(f1_data)
  );

  assign s_ready  = fir1_en ? f1_in_ready : m1_ready;
  assign m1_valid = fir1_en ? f1_valid : s_valid;
  assign m1_data  = fir1_en ? f1_data  : s_data;

  logic f0_valid, f0_ready;
  iq_t  f0_data;

  fir #(.N_TAPS(FIR0_TAPS)) u_fir0 (
    .clk(clk2x), .rst_n(arstn), .rld_valid(fir0_rld), .rld_data(rld_data), .cfg_valid(fir0_cfg),
    .in_valid(m1_valid), .in_ready(m1_ready), .in(m1_data),
    .out_valid(f0_valid), .out_ready(f0_ready), .out(f0_data)
  );

  // ---- CIC interpolator with bypass (MPX0) ----
  logic cic_in_ready, cic_valid, m0_valid, m0_ready;
  iq_t  cic_data, m0_data;

  cic_interp #(.N_STAGES(CIC_STAGES)) u_cic (
    .clk(clk2x), .rst_n(arstn), .rate(cic_rate),
    .in_valid(cic_en && f0_valid), .in_ready(cic_in_ready), .in(f0_data),
    .out_valid(cic_valid), .out_ready(cic_en && m0_ready), .out(cic_data)
  );

  assign f0_ready = cic_en ? cic_in_ready : m0_ready;
  assign m0_valid = cic_en ? cic_valid : f0_valid;
  assign m0_data  = cic_en ? cic_data  : f0_data;

  // ---- frequency shift ----
  iq_t  osc, dds_out;
  logic [31:0] dds_phase;
  logic mix_valid, mix_ready;
  iq_t  mix_data;

  dds u_dds (
    .clk(clk2x), .rst_n(arstn), .pinc(dds_pinc), .step(dds_en && m0_valid && m0_ready),
    .out(dds_out), .phase(dds_phase)
  );

  assign osc = dds_en ? dds_out : const_iq;

  cmpy u_cmpy (
    .clk(clk2x), .rst_n(arstn), .in_valid(m0_valid), .in_ready(m0_ready), .a(m0_data), .b(osc),
    .out_valid(mix_valid), .out_ready(mix_ready), .out(mix_data)
  );

  always_ff @(posedge clk2x or negedge arstn) begin
    if (!arstn)                      sent <= '0;
    else if (mix_valid && mix_ready) sent <= sent + 1'b1;
  end

  // ---- clk2x -> clk ----
  logic [15:0] out_ovf;

  async_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_out_sync (
    .wr_clk(clk2x), .wr_rst_n(arstn), .wr_valid(mix_valid), .wr_ready(mix_ready),
    .wr_data(mix_data), .wr_overflow(out_ovf),
    .rd_clk(clk), .rd_rst_n(arstn), .rd_valid(dac_tvalid), .rd_ready(dac_tready), .rd_data(dac_tdata)
  );

endmodule
