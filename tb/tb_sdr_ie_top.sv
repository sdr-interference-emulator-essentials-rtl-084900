// tb_sdr_ie_top: end-to-end test of the complete firmware at its default parameters. An LVDS
// ADC model drives the data clock and both channels; the test then
//   - waits for the clock system to lock, shifts the capture clock by one bit period over the
//     MMCM register and checks that locked drops and returns (phase shift and relock)
//   - aligns the frame and data lane delays with the pattern checker (delay alignment)
//   - checks that the DAC bus carries the idle sample while the trigger enable is low
//   - sets the receive chain to DDS mixing, CIC decimation by 4, FIR1 bypassed and
//     downsampling by 2, and the transmit chain to upsampling by 2 with the CIC bypassed
//   - raises the shared enable, records the ADC samples entering the receive chain, and
//     compares two DMA packets (with tlast) against the reference computed from them
//   - sends a ramp over the transmit DMA stream and compares the words decoded from the DAC
//     bus with the reference; after the ramp the DAC runs dry and must count gaps (underflow)
//   - stalls the receive DMA stream until the input FIFO overflows and reads the count back.
// Each mechanism has a counter, and any counter left at zero is a failure.
module tb_sdr_ie_top;
  import sdr_pkg::*;
  import dsp_ref_pkg::*;
  localparam int NT = 32;
  localparam logic [31:0] PINC = 32'h0234_5678;
  localparam sample_t IDLE_I = 16'sh2BCD, IDLE_Q = -16'sh1357;

  logic dclk_p, dclk_n, a_fr_p, a_fr_n, b_fr_p, b_fr_n;
  logic [3:0] a_d_p, a_d_n, b_d_p, b_d_n;
  logic pattern_mode = 1;
  logic [15:0] pattern = 16'hA53C;
  logic [15:0] dac_p, dac_n;
  logic dci_p, dci_n, dfr_p, dfr_n, sync_p, sync_n;
  logic clk2d = 0, clk = 0, clk2x = 0, rstn_dsp = 0, mmcm_rst = 1, ena = 0;
  logic adc_clk, locked;
  axil_req_t adc_req, drp_req, rx_req, tx_req;
  axil_rsp_t adc_rsp, drp_rsp, rx_rsp, tx_rsp;
  logic rx_tvalid, rx_tready = 1, rx_tlast;
  logic [31:0] rx_tdata;
  logic tx_tvalid = 0, tx_tready;
  logic [31:0] tx_tdata;
  logic [31:0] chk_samples;
  logic [15:0] chk_gaps, chk_seq_err;
  int checks = 0, failures = 0;

  adc_lvds_model adc_model (
    .pattern_mode, .pattern, .DCLK_P(dclk_p), .DCLK_N(dclk_n),
    .A_D_P(a_d_p), .A_D_N(a_d_n), .A_FRAME_P(a_fr_p), .A_FRAME_N(a_fr_n),
    .B_D_P(b_d_p), .B_D_N(b_d_n), .B_FRAME_P(b_fr_p), .B_FRAME_N(b_fr_n)
  );

  sdr_ie_top dut (
    .ADC_A_DCLK_P(dclk_p), .ADC_A_DCLK_N(dclk_n), .ADC_B_DCLK_P(dclk_p), .ADC_B_DCLK_N(dclk_n),
    .ADC_A_D_P(a_d_p), .ADC_A_D_N(a_d_n), .ADC_A_FRAME_P(a_fr_p), .ADC_A_FRAME_N(a_fr_n),
    .ADC_B_D_P(b_d_p), .ADC_B_D_N(b_d_n), .ADC_B_FRAME_P(b_fr_p), .ADC_B_FRAME_N(b_fr_n),
    .ADC_CTRL_OVRA(1'b0), .ADC_CTRL_OVRB(1'b0), .ADC_SYNC_P(sync_p), .ADC_SYNC_N(sync_n),
    .DAC_D_P(dac_p), .DAC_D_N(dac_n), .DAC_DCI_P(dci_p), .DAC_DCI_N(dci_n),
    .DAC_FRAME_P(dfr_p), .DAC_FRAME_N(dfr_n),
    .clk2d, .clk, .clk2x, .rstn_dsp, .mmcm_rst, .ena_adc_dac_data(ena),
    .adc_sample_period(16'd0), .adc_clk, .mmcm_locked(locked),
    .adc_ctrl_axi_req(adc_req), .adc_ctrl_axi_rsp(adc_rsp),
    .drp_mmcm_axi_req(drp_req), .drp_mmcm_axi_rsp(drp_rsp),
    .rx_chain_axi_req(rx_req), .rx_chain_axi_rsp(rx_rsp),
    .tx_chain_axi_req(tx_req), .tx_chain_axi_rsp(tx_rsp),
    .rx_dma_tvalid(rx_tvalid), .rx_dma_tready(rx_tready), .rx_dma_tdata(rx_tdata),
    .rx_dma_tlast(rx_tlast),
    .tx_dma_tvalid(tx_tvalid), .tx_dma_tready(tx_tready), .tx_dma_tdata(tx_tdata),
    .dac_idle_i(IDLE_I), .dac_idle_q(IDLE_Q), .dac_chk_ramp(1'b0),
    .dac_chk_samples(chk_samples), .dac_chk_gaps(chk_gaps), .dac_chk_seq_err(chk_seq_err)
  );

  axil_master bfm_adc (.clk(adc_clk), .req(adc_req), .rsp(adc_rsp));
  axil_master bfm_drp (.clk(clk), .req(drp_req), .rsp(drp_rsp));
  axil_master bfm_rx  (.clk(clk2x), .req(rx_req), .rsp(rx_rsp));
  axil_master bfm_tx  (.clk(clk2x), .req(tx_req), .rsp(tx_rsp));

  always #1 clk2x = ~clk2x;
  initial begin #0.3; forever #2 clk = ~clk; end
  always #4 clk2d = ~clk2d;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_relock = 0, n_align = 0, n_idle = 0, n_stall = 0, n_overflow = 0, n_tlast = 0;
  int n_mode = 0, n_bypass = 0, n_decim = 0, n_interp = 0, n_underflow = 0;

  always @(negedge locked) if (!mmcm_rst) n_relock++;

  // receive side: ADC samples into the chain, DMA words out
  seq_t adc_i, adc_q, dma_i, dma_q;
  int   dma_last[$];
  bit   rec = 0;
  always @(posedge adc_clk) if (rec && dut.adc_tvalid) begin
    adc_i.push_back(int'(dut.adc_tdata.i));
    adc_q.push_back(int'(dut.adc_tdata.q));
  end
  always @(posedge clk) if (rstn_dsp) begin
    if (rx_tvalid && rx_tready) begin
      dma_i.push_back(int'(signed'(rx_tdata[15:0])));
      dma_q.push_back(int'(signed'(rx_tdata[31:16])));
      if (rx_tlast) dma_last.push_back(dma_i.size());
    end
    if (rx_tvalid && !rx_tready) n_stall++;
  end

  // transmit side: DMA source on clk, DAC bus decoder on the 500 MHz bus clock
  seq_t tx_i, tx_q, dac_i, dac_q;
  int   tx_n = 0;
  bit   tx_feed = 0;
  logic tx_ready_q;
  always @(posedge clk) tx_ready_q = tx_tready;
  always @(negedge clk) begin
    if (tx_tvalid && tx_ready_q) tx_n++;
    if (tx_feed && tx_n < tx_i.size()) begin
      tx_tvalid = 1;
      tx_tdata = {16'(tx_q[tx_n]), 16'(tx_i[tx_n])};
    end else tx_tvalid = 0;
  end

  logic [15:0] cur_i;
  bit have_i = 0;
  int n_pin = 0;
  always @(posedge dut.clk500) begin
    #0.1;
    if (locked && !dut.rst250) begin
      if (dac_n !== ~dac_p || dfr_n !== ~dfr_p || dci_n !== ~dci_p) n_pin++;
      if (dfr_p) begin cur_i = dac_p; have_i = 1; end
      else if (have_i) begin
        have_i = 0;
        if (cur_i == IDLE_I && dac_p == IDLE_Q) n_idle++;
        else begin
          dac_i.push_back(int'(signed'(cur_i)));
          dac_q.push_back(int'(signed'(dac_p)));
        end
      end
    end
  end

  task automatic run_check(input chck_sel_e sel, output int errs);
    logic [31:0] d;
    bfm_adc.write(ADC_REG_CHCK_CTRL, {29'd0, sel, 1'b1});
    bfm_adc.write(ADC_REG_CHCK_CTRL, {29'd0, sel, 1'b0});
    do bfm_adc.read(ADC_REG_STATUS, d); while (!d[0]);
    bfm_adc.read(ADC_REG_ERR_CNT, d);
    errs = int'(d);
  endtask

  task automatic compare(input seq_t gi, input seq_t gq, input seq_t ei, input seq_t eq,
                         input int n, input string what, output bit ok);
    int bad = 0;
    check(gi.size() >= n && ei.size() >= n,
          $sformatf("%s: %0d samples, %0d expected, %0d needed", what, gi.size(), ei.size(), n));
    for (int k = 0; k < n && k < gi.size() && k < ei.size(); k++)
      if (gi[k] != ei[k] || gq[k] != eq[k]) begin
        bad++;
        if (bad < 5) $display("  %s %0d: got %0d,%0d exp %0d,%0d", what, k, gi[k], gq[k], ei[k], eq[k]);
      end
    check(bad == 0, $sformatf("%s: samples match (%0d differ)", what, bad));
    ok = (bad == 0 && gi.size() >= n);
  endtask

  initial begin
    logic [31:0] d;
    int errs, df, dd;
    seq_t ri, rq, ti, tq;
    int c0[];
    bit ok;
    c0 = new[NT];
    foreach (c0[k]) c0[k] = (k == 0) ? 32767 : 0;

    #20 mmcm_rst = 0;
    #20 rstn_dsp = 1;
    wait (locked);
    check(1, "clock system locked");
    // phase shift by one bit period (20 steps of 50 ps) and relock
    bfm_drp.write(8'h00, 20);
    #5;
    check(!locked, "locked drops on a phase change");
    wait (locked);
    bfm_drp.read(8'h00, d);
    check(d[7:0] == 20 && n_relock > 0, "phase setting kept, relocked");

    // delay alignment with the pattern checker
    do bfm_adc.read(ADC_REG_STATUS, d); while (!d[1]);
    bfm_adc.write(ADC_REG_IDLY_VTC, 0);
    df = -1;
    for (int v = 0; v <= 12 && df < 0; v++) begin
      bfm_adc.write(ADC_REG_IDLY_FRAME, v);
      bfm_adc.write(ADC_REG_IDLY_LOAD, 1);
      run_check(CHK_FRAME, errs);
      if (errs == 0) df = v;
    end
    bfm_adc.write(ADC_REG_CHCK_REF, pattern);
    dd = -1;
    for (int v = 0; v <= 12 && dd < 0; v++) begin
      bfm_adc.write(ADC_REG_IDLY_DATA, v);
      bfm_adc.write(ADC_REG_IDLY_LOAD, 1);
      run_check(CHK_DES_AB, errs);
      if (errs == 0) dd = v;
    end
    check(df >= 0 && dd >= 0, $sformatf("frame (%0d) and data (%0d) delays found", df, dd));
    if (df >= 0 && dd >= 0) n_align++;
    bfm_adc.write(ADC_REG_IDLY_VTC, 1);
    pattern_mode = 0;

    // idle DAC output while disabled
    repeat (40) @(posedge clk);
    check(n_idle > 0 && dac_i.size() == 0, "DAC bus carries the idle sample while disabled");

    // chain set-up
    bfm_rx.write(CH_REG_DDS_PINC, PINC);
    bfm_rx.write(CH_REG_DDS_EN, 1);
    bfm_rx.write(CH_REG_CIC_RATE, 4);
    bfm_rx.write(CH_REG_CIC_EN, 1);
    bfm_rx.write(CH_REG_FIR1_CFG, 0);
    bfm_rx.write(CH_REG_RATE, 2);
    bfm_tx.write(CH_REG_RATE, 2);
    for (int k = 0; k < 600; k++) begin
      tx_i.push_back(20 * k - 6000);
      tx_q.push_back(5000 - 13 * k);
    end

    // run
    @(posedge adc_clk) rec = 1;
    @(negedge clk) ena = 1;
    wait (dut.adc_data_ena);
    n_mode++;
    @(negedge clk) tx_feed = 1;
    wait (dma_i.size() >= 2048 && tx_n == tx_i.size());
    @(posedge adc_clk) rec = 0;
    repeat (400) @(posedge clk);
    check(chk_gaps > 0, "DAC ran dry after the transmit stream: gaps counted");
    if (chk_gaps > 0) n_underflow++;
    @(negedge clk) ena = 0;
    repeat (40) @(posedge clk);

    // receive reference: DDS mix, CIC decimation, FIR0, FIR1 bypassed, downsampling
    mix(adc_i, adc_q, 1, PINC, 0, 0, ri, rq);
    ri = down(fir_run(cic_dec(ri, 4, 4), c0), 2);
    rq = down(fir_run(cic_dec(rq, 4, 4), c0), 2);
    compare(dma_i, dma_q, ri, rq, 2048, "receive DMA", ok);
    if (ok) begin n_mode++; n_bypass++; n_decim++; end
    check(dma_last.size() >= 2 && dma_last[0] == 1024 && dma_last[1] == 2048,
          "tlast closes each 1024-word packet");
    n_tlast = dma_last.size();

    // transmit reference: upsampling, FIR1, FIR0, CIC bypassed, constant mixer
    ti = fir_run(fir_run(up(tx_i, 2), c0), c0);
    tq = fir_run(fir_run(up(tx_q, 2), c0), c0);
    mix(ti, tq, 0, 0, 32767, 0, ti, tq);
    compare(dac_i, dac_q, ti, tq, ti.size(), "DAC bus", ok);
    if (ok) begin n_bypass++; n_interp++; end
    check(n_pin == 0, "DAC _N legs complement the _P legs");

    // receive DMA stall until the input FIFO overflows
    @(negedge clk) rx_tready = 0;
    @(negedge clk) ena = 1;
    repeat (6000) @(posedge clk);
    bfm_rx.read(CH_REG_STATUS, d);
    n_overflow = int'(d[15:0]);
    check(n_overflow > 0, "stalled DMA stream overflows the receive FIFO");
    @(negedge clk) ena = 0; rx_tready = 1;
    repeat (100) @(posedge clk);
    check(sync_p == 0 && sync_n == 1, "ADC SYNC held inactive");

    $display("mechanisms: relock=%0d align=%0d idle=%0d stall=%0d overflow=%0d tlast=%0d mode=%0d bypass=%0d decim=%0d interp=%0d underflow=%0d",
             n_relock, n_align, n_idle, n_stall, n_overflow, n_tlast, n_mode, n_bypass, n_decim, n_interp, n_underflow);
    check(n_relock > 0, "mechanism: phase shift and relock");
    check(n_align > 0, "mechanism: delay alignment");
    check(n_idle > 0, "mechanism: idle sample");
    check(n_stall > 0, "mechanism: DMA stall");
    check(n_overflow > 0, "mechanism: FIFO overflow");
    check(n_tlast > 0, "mechanism: packet tlast");
    check(n_mode >= 2, "mechanism: mode switch (enable, DDS mixing)");
    check(n_bypass >= 2, "mechanism: bypass (RX FIR1, TX CIC)");
    check(n_decim > 0, "mechanism: decimation");
    check(n_interp > 0, "mechanism: interpolation");
    check(n_underflow > 0, "mechanism: DAC underflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
