// tb_dac: streams a ramp (I = n, Q = ~n) into the DAC interface and decodes the LVDS bus: with
// FRAME high a word is I, the next word Q. Checks idle samples while disabled, the enable
// latency, that the ramp arrives complete and in order at one sample per two clk500 cycles,
// that an interrupted stream puts idle samples out and is counted as gaps by the checker,
// the checker's ramp-break count, and the complementary _N legs and toggling DCI.
module tb_dac;
  import sdr_pkg::*;
  logic clk500 = 0, clk125 = 0, aclk = 0, rst = 1, dac_data_ena = 0;
  logic tvalid = 0, tready;
  iq_t tdata;
  sample_t I = 16'sh1234, Q = -16'sh0055;
  logic chk_ramp = 1;
  logic [31:0] chk_samples;
  logic [15:0] chk_gaps, chk_seq_err, d_p, d_n;
  logic dci_p, dci_n, fr_p, fr_n;
  int checks = 0, failures = 0;

  dac #(.FIFO_DEPTH(16)) dut (
    .clk500, .clk125, .rst, .dac_data_ena, .dac_aclk(aclk), .dac_tvalid(tvalid), .dac_tready(tready),
    .dac_tdata(tdata), .I, .Q, .chk_ramp, .chk_samples, .chk_gaps, .chk_seq_err,
    .DAC_D_P(d_p), .DAC_D_N(d_n), .DAC_DCI_P(dci_p), .DAC_DCI_N(dci_n),
    .DAC_FRAME_P(fr_p), .DAC_FRAME_N(fr_n)
  );

  always #1 clk500 = ~clk500;
  always #4 clk125 = ~clk125;
  always #2 aclk = ~aclk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bus decoder
  logic [15:0] cur_i;
  bit have_i = 0;
  int n_idle = 0, n_ramp = 0, n_bad = 0, n_pin = 0, last = -1, n_words = 0;
  logic last_dci;
  always @(posedge clk500) begin
    #0.1;
    if (!rst) begin
      n_words++;
      if (d_n !== ~d_p || fr_n !== ~fr_p || dci_n !== ~dci_p) n_pin++;
      if (n_words > 1 && dci_p === last_dci) n_pin++;
      last_dci = dci_p;
      if (fr_p) begin cur_i = d_p; have_i = 1; end
      else if (have_i) begin
        have_i = 0;
        if (cur_i == I && d_p == Q) n_idle++;
        else if (d_p == ~cur_i) begin
          if (last >= 0 && int'(cur_i) != last + 1) n_bad++;
          last = int'(cur_i);
          n_ramp++;
        end else n_bad++;
      end
    end
  end

  int sent = 0;
  bit feed = 0;
  always @(negedge aclk) begin
    if (tvalid && tready_q) sent++;
    tvalid = feed;
    tdata.i = 16'(sent);
    tdata.q = ~16'(sent);
  end
  logic tready_q;
  always @(posedge aclk) tready_q = tready;

  initial begin
    repeat (4) @(posedge clk125);
    rst = 0;
    repeat (40) @(posedge clk500);
    check(n_idle >= 18 && n_ramp == 0, "idle samples while disabled");
    feed = 1;
    repeat (40) @(posedge aclk);
    check(n_ramp == 0, "nothing sent before enable");
    @(negedge clk125) dac_data_ena = 1;
    repeat (400) @(posedge clk500);
    check(n_ramp >= 190 && n_bad == 0, "ramp complete and in order");
    check(n_pin == 0, "complementary legs and DCI toggle");
    check(chk_gaps == 0 && chk_seq_err == 0, "checker: no gaps, no breaks");
    // starve the FIFO: gaps and idle samples
    begin
      int idle0, rate0;
      feed = 0;
      repeat (60) @(posedge clk500);
      idle0 = n_idle;
      repeat (40) @(posedge clk500);
      check(n_idle - idle0 >= 18, "idle samples on underflow");
      check(chk_gaps >= 18, "checker counts gaps");
      rate0 = n_ramp;
      feed = 1;
      repeat (200) @(posedge clk500);
      check(n_ramp - rate0 >= 90, "restart after underflow");
      check(n_bad == 0 && chk_seq_err == 0, "ramp continues without a break");
      check(int'(chk_samples) >= n_ramp - 2 && int'(chk_samples) <= n_ramp + 2, "checker counts samples");
    end
    // break the ramp once
    @(negedge aclk);
    sent = sent + 5;
    repeat (100) @(posedge clk500);
    check(chk_seq_err == 1, "checker counts a ramp break");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
