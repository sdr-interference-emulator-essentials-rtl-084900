// tb_clock_system: checks the clock model: output periods (2, 4, 8 and 8 ns), locked rising
// after reset, the phase of clk500 against the input clock before and after phase writes
// (STEP_PS per step), and that locked drops and returns after each write.
module tb_clock_system;
  import sdr_pkg::*;
  logic dclk = 0, rst = 1, axi_clk = 0, axi_rst_n = 0;
  axil_req_t req;
  axil_rsp_t rsp;
  logic clk500, clk250, clk125, clk125_ref, locked;
  int checks = 0, failures = 0;

  clock_system #(.STEP_PS(50), .LOCK_CYCLES(16)) dut (
    .ADC_A_DCLK_P(dclk), .ADC_A_DCLK_N(~dclk), .ADC_B_DCLK_P(dclk), .ADC_B_DCLK_N(~dclk),
    .rst, .axi_clk, .axi_rst_n, .drp_mmcm_axi_req(req), .drp_mmcm_axi_rsp(rsp),
    .clk500, .clk250, .clk125, .clk125_ref, .locked
  );
  axil_master bfm (.clk(axi_clk), .req, .rsp);

  always #1 dclk = ~dclk;
  always #5 axi_clk = ~axi_clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  realtime t_in, t_out;
  always @(posedge dclk) t_in = $realtime;
  always @(posedge clk500) t_out = $realtime;

  task automatic period(ref logic c, input real exp_ns, input string what);
    realtime a, b;
    @(posedge c); a = $realtime;
    @(posedge c); b = $realtime;
    check((b - a) > exp_ns - 0.01 && (b - a) < exp_ns + 0.01, what);
  endtask

  task automatic phase_is(input real exp_ns, input string what);
    realtime a;
    @(posedge dclk); a = $realtime;
    @(posedge clk500);
    if (!(($realtime - a) > exp_ns - 0.005 && ($realtime - a) < exp_ns + 0.005)) $display("measured %f", $realtime - a);
    check(($realtime - a) > exp_ns - 0.005 && ($realtime - a) < exp_ns + 0.005, what);
  endtask

  initial begin
    int t0;
    #13 axi_rst_n = 1;
    #10 rst = 0;
    check(!locked, "not locked right after reset");
    repeat (20) @(posedge dclk);
    check(locked, "locked after LOCK_CYCLES");
    period(clk500, 2.0, "clk500 period");
    period(clk250, 4.0, "clk250 period");
    period(clk125, 8.0, "clk125 period");
    period(clk125_ref, 8.0, "clk125_ref period");
    phase_is(0.0, "no shift at reset");
    bfm.write(8'h00, 10);
    #0.5;
    check(!locked, "lock lost during reconfiguration");
    repeat (20) @(posedge dclk);
    check(locked, "locked again");
    phase_is(0.5, "10 steps of 50 ps");
    bfm.write(8'h00, 30);
    repeat (20) @(posedge dclk);
    phase_is(1.5, "30 steps of 50 ps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
