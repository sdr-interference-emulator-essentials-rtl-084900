// tb_tx_chain: end-to-end test of the transmit chain against the reference models of
// dsp_ref_pkg. {Q, I} words are offered on the DMA stream (clk) and the DAC side takes a sample
// on every clk cycle, the DAC's 250 MS/s. Three runs, each after a reset and a register set-up:
//   1. reset settings: FIR1 and FIR0 with their default single tap, constant mixer, no rate change
//   2. upsampling by 2, FIR1 reloaded with random taps, CIC interpolation by 4, constant
//      0.5+0.125j: eight output samples per input, which must leave without a gap
//   3. FIR1 bypassed, DDS on
// Every output sample is compared with the reference.
module tb_tx_chain;
  import sdr_pkg::*;
  import dsp_ref_pkg::*;
  localparam int NT = 32;
  logic clk2d = 0, clk = 0, clk2x = 0, arstn = 0;
  axil_req_t req;
  axil_rsp_t rsp;
  logic tx_tvalid = 0, tx_tready;
  logic [31:0] tx_tdata;
  logic dac_tvalid, dac_tready = 1;
  iq_t dac_tdata;
  int checks = 0, failures = 0;

  tx_chain dut (
    .clk2d, .clk, .clk2x, .arstn, .axi_req(req), .axi_rsp(rsp),
    .tx_dma_tvalid(tx_tvalid), .tx_dma_tready(tx_tready), .tx_dma_tdata(tx_tdata),
    .dac_tvalid, .dac_tready, .dac_tdata
  );
  axil_master bfm (.clk(clk2x), .req, .rsp);

  always #0.5 clk2x = ~clk2x;
  initial begin #0.3; forever #1 clk = ~clk; end
  always #2 clk2d = ~clk2d;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  seq_t src_i, src_q;
  int   src_n = 0;
  bit   feeding = 0;
  always @(negedge clk) begin
    if (tx_tvalid && tready_q) src_n++;
    if (feeding && src_n < src_i.size()) begin
      tx_tvalid = 1;
      tx_tdata = {16'(src_q[src_n]), 16'(src_i[src_n])};
    end else tx_tvalid = 0;
  end
  logic tready_q;
  always @(posedge clk) tready_q = tx_tready;

  iq_t got[$];
  int  first_t = -1, last_t = -1, cyc = 0, n_gap = 0;
  always @(posedge clk) begin
    cyc++;
    if (arstn && dac_tvalid && dac_tready) begin
      if (first_t >= 0 && cyc - last_t > 1) n_gap++;
      if (first_t < 0) first_t = cyc;
      last_t = cyc;
      got.push_back(dac_tdata);
    end
  end

  task automatic start(input int n, input int amp);
    arstn = 0;
    repeat (3) @(posedge clk2x);
    arstn = 1;
    src_i = {}; src_q = {}; src_n = 0; got = {}; first_t = -1; n_gap = 0;
    for (int k = 0; k < n; k++) begin
      src_i.push_back($urandom_range(0, 2 * amp) - amp);
      src_q.push_back($urandom_range(0, 2 * amp) - amp);
    end
    repeat (2) @(posedge clk2x);
  endtask

  task automatic run_and_compare(input seq_t ei, input seq_t eq, input string what, input bit no_gaps);
    int bad = 0;
    feeding = 1;
    wait (src_n == src_i.size());
    repeat (600) @(posedge clk2x);
    feeding = 0;
    check(got.size() == ei.size(), $sformatf("%s: %0d samples, expected %0d", what, got.size(), ei.size()));
    foreach (got[k]) if (k < ei.size()) begin
      if (int'(got[k].i) != ei[k] || int'(got[k].q) != eq[k]) begin
        bad++;
        if (bad < 5) $display("  %s sample %0d: got %0d,%0d exp %0d,%0d", what, k, got[k].i, got[k].q, ei[k], eq[k]);
      end
    end
    check(bad == 0, $sformatf("%s: all samples match (%0d differ)", what, bad));
    if (no_gaps) check(n_gap == 0, $sformatf("%s: one sample per DAC clock without gaps (%0d gaps)", what, n_gap));
  endtask

  initial begin
    seq_t a_i, a_q;
    int c0[], cf[];
    c0 = new[NT];
    foreach (c0[k]) c0[k] = (k == 0) ? 32767 : 0;

    // 1. reset settings
    start(300, 8000);
    a_i = fir_run(fir_run(src_i, c0), c0);
    a_q = fir_run(fir_run(src_q, c0), c0);
    mix(a_i, a_q, 0, 0, 32767, 0, a_i, a_q);
    run_and_compare(a_i, a_q, "defaults", 0);

    // 2. upsampler, FIR1 reload, CIC interpolation
    start(100, 12000);
    cf = new[NT];
    foreach (cf[k]) cf[k] = $urandom_range(0, 6000) - 3000;
    foreach (cf[k]) bfm.write(CH_REG_FIR1_RLD, 32'(cf[k]));
    bfm.write(CH_REG_FIR1_CFG, 1);
    bfm.write(CH_REG_RATE, 2);
    bfm.write(CH_REG_CIC_RATE, 4);
    bfm.write(CH_REG_CIC_EN, 1);
    bfm.write(CH_REG_CONST, {16'sh1000, 16'sh4000});
    a_i = cic_int(fir_run(fir_run(up(src_i, 2), cf), c0), 4, 4);
    a_q = cic_int(fir_run(fir_run(up(src_q, 2), cf), c0), 4, 4);
    mix(a_i, a_q, 0, 0, 16'sh4000, 16'sh1000, a_i, a_q);
    run_and_compare(a_i, a_q, "up+fir1+cic", 1);

    // 3. DDS, FIR1 bypassed
    start(300, 16000);
    bfm.write(CH_REG_FIR1_CFG, 0);
    bfm.write(CH_REG_DDS_PINC, 32'hF123_4567);
    bfm.write(CH_REG_DDS_EN, 1);
    a_i = fir_run(src_i, c0);
    a_q = fir_run(src_q, c0);
    mix(a_i, a_q, 1, 32'hF123_4567, 0, 0, a_i, a_q);
    run_and_compare(a_i, a_q, "dds", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
