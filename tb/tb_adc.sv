// tb_adc: runs the alignment procedure the processor uses against the ADC model. It sweeps the
// frame-lane delay with the checker in frame mode and the data-lane delay with the ADC sending
// a test pattern, keeping settings with zero error bits; it checks that a delay load is ignored
// while en_vtc is set. Then it switches the model to counting samples and checks the I/Q
// stream: channel A must be 7 times channel B's count on every sample, samples must be
// consecutive, one per clk250 with adc_sample_period 0 and one per 3 with period 2, none while
// adc_data_ena is low or clk_invalid is high, and the overrange inputs must appear in tuser.
module tb_adc;
  import sdr_pkg::*;
  logic clk500, clk250 = 0, rst250 = 1;
  logic clk_invalid = 0, adc_data_ena = 0;
  logic [15:0] adc_sample_period = 0;
  axil_req_t req;
  axil_rsp_t rsp;
  logic dclk_p, dclk_n;
  logic [3:0] a_p, a_n, b_p, b_n;
  logic af_p, af_n, bf_p, bf_n;
  logic ovra = 0, ovrb = 0, sync_p, sync_n;
  logic adc_tvalid;
  iq_t adc_tdata;
  logic [1:0] adc_tuser;
  logic pattern_mode = 1;
  logic [15:0] pattern = 16'hA53C;
  int checks = 0, failures = 0;

  adc_lvds_model #(.OFS(3), .SKEW(2)) model (
    .pattern_mode, .pattern, .DCLK_P(dclk_p), .DCLK_N(dclk_n),
    .A_D_P(a_p), .A_D_N(a_n), .A_FRAME_P(af_p), .A_FRAME_N(af_n),
    .B_D_P(b_p), .B_D_N(b_n), .B_FRAME_P(bf_p), .B_FRAME_N(bf_n)
  );

  adc #(.CHCK_LEN(64), .IDLY_RDY_CYCLES(16)) dut (
    .clk500, .clk250, .rst250, .clk_invalid, .adc_data_ena, .adc_sample_period,
    .axi_req(req), .axi_rsp(rsp),
    .ADC_A_D_P(a_p), .ADC_A_D_N(a_n), .ADC_A_FRAME_P(af_p), .ADC_A_FRAME_N(af_n),
    .ADC_B_D_P(b_p), .ADC_B_D_N(b_n), .ADC_B_FRAME_P(bf_p), .ADC_B_FRAME_N(bf_n),
    .ADC_CTRL_OVRA(ovra), .ADC_CTRL_OVRB(ovrb), .ADC_SYNC_P(sync_p), .ADC_SYNC_N(sync_n),
    .adc_tvalid, .adc_tdata, .adc_tuser
  );

  axil_master bfm (.clk(clk250), .req, .rsp);

  assign clk500 = dclk_p;
  always @(posedge clk500) clk250 <= ~clk250;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_check(input chck_sel_e sel, output int errs);
    logic [31:0] d;
    bfm.write(ADC_REG_CHCK_CTRL, {29'd0, sel, 1'b1});
    bfm.write(ADC_REG_CHCK_CTRL, {29'd0, sel, 1'b0});
    do bfm.read(ADC_REG_STATUS, d); while (!d[0]);
    bfm.read(ADC_REG_ERR_CNT, d);
    errs = int'(d);
  endtask

  // stream monitor
  int n_valid = 0, n_bad = 0, last_b = -1, gap_ok = 0;
  int cyc = 0, last_cyc = 0;
  bit mon = 0;
  int exp_gap = 1;
  always @(posedge clk250) begin
    cyc++;
    if (mon && adc_tvalid) begin
      logic [15:0] n;
      n = adc_tdata.q ^ 16'h8000;
      n_valid++;
      if (adc_tdata.i != 16'(7 * n)) n_bad++;
      if (last_b >= 0) begin
        if (int'(n) != last_b + exp_gap) n_bad++;
        if (cyc - last_cyc != exp_gap) n_bad++;
      end
      last_b = int'(n);
      last_cyc = cyc;
    end
  end

  initial begin
    logic [31:0] d;
    int errs, df, dd;
    repeat (4) @(posedge clk250);
    rst250 = 0;
    do bfm.read(ADC_REG_STATUS, d); while (!d[1]);
    check(1, "delay controller ready");
    // load ignored while en_vtc is set
    bfm.write(ADC_REG_IDLY_FRAME, 1);
    bfm.write(ADC_REG_IDLY_LOAD, 1);
    check(dut.dly_frame == 0, "load ignored while en_vtc set");
    bfm.write(ADC_REG_IDLY_VTC, 0);
    // frame sweep
    df = -1;
    for (int v = 0; v <= 12 && df < 0; v++) begin
      bfm.write(ADC_REG_IDLY_FRAME, v);
      bfm.write(ADC_REG_IDLY_LOAD, 1);
      run_check(CHK_FRAME, errs);
      if (errs == 0) df = v;
    end
    check(df >= 0, "frame alignment found");
    // data sweep with the test pattern
    bfm.write(ADC_REG_CHCK_REF, pattern);
    dd = -1;
    for (int v = 0; v <= 12 && dd < 0; v++) begin
      bfm.write(ADC_REG_IDLY_DATA, v);
      bfm.write(ADC_REG_IDLY_LOAD, 1);
      run_check(CHK_DES_AB, errs);
      if (errs == 0) dd = v;
    end
    check(dd >= 0, "data alignment found");
    check(((dd - df) % 4 + 4) % 4 == 2, "data delay differs from frame delay by the lane skew");
    // a wrong data delay must give errors
    bfm.write(ADC_REG_IDLY_DATA, dd + 1);
    bfm.write(ADC_REG_IDLY_LOAD, 1);
    run_check(CHK_DES_AB, errs);
    check(errs > 0, "misaligned data delay shows errors");
    bfm.write(ADC_REG_IDLY_DATA, dd);
    bfm.write(ADC_REG_IDLY_LOAD, 1);
    // counting samples
    pattern_mode = 0;
    repeat (10) @(posedge clk250);
    check(n_valid == 0, "no samples while disabled");
    @(negedge clk250) adc_data_ena = 1; mon = 1;
    repeat (100) @(posedge clk250);
    #0.1;
    check(n_valid >= 98 && n_bad == 0, "consecutive samples, one per clock");
    mon = 0; last_b = -1;
    @(negedge clk250) adc_sample_period = 2; exp_gap = 3;
    @(negedge clk250); @(negedge clk250); n_valid = 0; mon = 1;
    repeat (90) @(posedge clk250);
    #0.1;
    check(n_valid >= 28 && n_valid <= 31 && n_bad == 0, "one sample every third clock");
    mon = 0;
    @(negedge clk250) clk_invalid = 1;
    @(negedge clk250); n_valid = 0; mon = 1; last_b = -1;
    repeat (20) @(posedge clk250);
    check(n_valid == 0, "no samples while the clock is invalid");
    mon = 0;
    @(negedge clk250) clk_invalid = 0; adc_sample_period = 0; ovra = 1; ovrb = 0;
    @(posedge adc_tvalid); #0.1;
    check(adc_tuser == 2'b01, "overrange A in tuser");
    check(sync_p == 0 && sync_n == 1, "SYNC held inactive");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
