// tb_rx_chain: end-to-end test of the receive chain against the reference models of
// dsp_ref_pkg. ADC samples arrive every ADC clock (250 MHz) and DMA words are collected on
// clk. Four runs, each after a reset and a register set-up over AXI-Lite:
//   1. reset settings: constant mixer, both FIRs with their default single tap, no rate change
//   2. constant 0.5+0.125j, CIC on at rate 4, FIR0 reloaded with random taps, FIR1 bypassed,
//      downsampling by 2
//   3. DDS on, both FIRs, CIC bypassed
//   4. DMA stalled while the ADC keeps sending: lost samples must be counted in the status
//      register, and data must flow again afterwards
// Runs 1-3 compare every {Q, I} word and the tlast positions (every PKT_LEN words) and check
// that the chain keeps up with the full ADC rate (no lost samples).
module tb_rx_chain;
  import sdr_pkg::*;
  import dsp_ref_pkg::*;
  localparam int PKT = 64;
  localparam int NT = 32;
  logic clk2d = 0, clk = 0, clk2x = 0, adc_clk = 0, arstn = 0;
  axil_req_t req;
  axil_rsp_t rsp;
  logic adc_tvalid = 0;
  iq_t adc_tdata;
  logic rx_tvalid, rx_tready = 1, rx_tlast;
  logic [31:0] rx_tdata;
  int checks = 0, failures = 0;

  rx_chain #(.PKT_LEN(PKT)) dut (
    .clk2d, .clk, .clk2x, .arstn, .axi_req(req), .axi_rsp(rsp),
    .adc_aclk(adc_clk), .adc_tvalid, .adc_tdata,
    .rx_dma_tvalid(rx_tvalid), .rx_dma_tready(rx_tready), .rx_dma_tdata(rx_tdata),
    .rx_dma_tlast(rx_tlast)
  );
  axil_master bfm (.clk(clk2x), .req, .rsp);

  always #0.5 clk2x = ~clk2x;
  always #1 adc_clk = ~adc_clk;
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

  // ADC source
  seq_t src_i, src_q;
  int   src_n = 0;
  bit   feeding = 0;
  always @(negedge adc_clk) begin
    if (feeding && src_n < src_i.size()) begin
      adc_tvalid = 1;
      adc_tdata.i = 16'(src_i[src_n]);
      adc_tdata.q = 16'(src_q[src_n]);
      src_n++;
    end else adc_tvalid = 0;
  end

  // DMA sink
  logic [31:0] got[$];
  bit          got_last[$];
  always @(posedge clk) if (arstn && rx_tvalid && rx_tready) begin
    got.push_back(rx_tdata);
    got_last.push_back(rx_tlast);
  end

  task automatic start(input int n, input int amp);
    arstn = 0;
    repeat (3) @(posedge clk2x);
    arstn = 1;
    src_i = {}; src_q = {}; src_n = 0; got = {}; got_last = {};
    for (int k = 0; k < n; k++) begin
      src_i.push_back($urandom_range(0, 2 * amp) - amp);
      src_q.push_back($urandom_range(0, 2 * amp) - amp);
    end
    repeat (2) @(posedge clk2x);
  endtask

  task automatic run_and_compare(input seq_t ei, input seq_t eq, input string what);
    logic [31:0] st;
    int bad = 0, badlast = 0;
    feeding = 1;
    wait (src_n == src_i.size());
    repeat (400) @(posedge clk2x);
    feeding = 0;
    check(got.size() == ei.size(), $sformatf("%s: %0d words, expected %0d", what, got.size(), ei.size()));
    foreach (got[k]) if (k < ei.size()) begin
      if (got[k] !== {16'(eq[k]), 16'(ei[k])}) begin
        bad++;
        if (bad < 5) $display("  %s word %0d: got %h exp %h", what, k, got[k], {16'(eq[k]), 16'(ei[k])});
      end
      if (got_last[k] !== ((k % PKT) == PKT - 1)) badlast++;
    end
    check(bad == 0, $sformatf("%s: all words match (%0d differ)", what, bad));
    check(badlast == 0, $sformatf("%s: tlast every %0d words", what, PKT));
    bfm.read(CH_REG_STATUS, st);
    check(st[15:0] == 0, $sformatf("%s: no lost samples at full ADC rate", what));
  endtask

  initial begin
    seq_t a_i, a_q, b_i, b_q;
    int c0[], cf[];
    c0 = new[NT];
    foreach (c0[k]) c0[k] = (k == 0) ? 32767 : 0;

    // 1. reset settings
    start(300, 8000);
    mix(src_i, src_q, 0, 0, 32767, 0, a_i, a_q);
    a_i = fir_run(fir_run(a_i, c0), c0);
    a_q = fir_run(fir_run(a_q, c0), c0);
    run_and_compare(a_i, a_q, "defaults");

    // 2. CIC, reloaded FIR0, FIR1 bypassed, downsampling
    start(1024, 12000);
    cf = new[NT];
    foreach (cf[k]) cf[k] = $urandom_range(0, 4000) - 2000;
    bfm.write(CH_REG_CONST, {16'sh1000, 16'sh4000});
    bfm.write(CH_REG_CIC_RATE, 4);
    bfm.write(CH_REG_CIC_EN, 1);
    foreach (cf[k]) bfm.write(CH_REG_FIR0_RLD, 32'(cf[k]));
    bfm.write(CH_REG_FIR0_CFG, 0);
    bfm.write(CH_REG_FIR1_CFG, 0);
    bfm.write(CH_REG_RATE, 2);
    mix(src_i, src_q, 0, 0, 16'sh4000, 16'sh1000, a_i, a_q);
    a_i = down(fir_run(cic_dec(a_i, 4, 4), cf), 2);
    a_q = down(fir_run(cic_dec(a_q, 4, 4), cf), 2);
    run_and_compare(a_i, a_q, "cic+fir0+down");

    // 3. DDS
    start(400, 16000);
    bfm.write(CH_REG_DDS_PINC, 32'h0123_4567);
    bfm.write(CH_REG_DDS_EN, 1);
    mix(src_i, src_q, 1, 32'h0123_4567, 0, 0, a_i, a_q);
    a_i = fir_run(fir_run(a_i, c0), c0);
    a_q = fir_run(fir_run(a_q, c0), c0);
    run_and_compare(a_i, a_q, "dds");

    // 4. DMA stall: overflow
    begin
      logic [31:0] st;
      int n0;
      start(3000, 1000);
      rx_tready = 0;
      feeding = 1;
      repeat (600) @(posedge adc_clk);
      bfm.read(CH_REG_STATUS, st);
      check(st[15:0] > 0, "lost samples counted while the DMA stalls");
      n0 = got.size();
      rx_tready = 1;
      repeat (200) @(posedge clk);
      check(got.size() > n0 + 100, "data flows again after the stall");
      feeding = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
