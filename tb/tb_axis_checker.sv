// tb_axis_checker: feeds a ramp with a few breaks and a few missing samples, and checks the
// sample, gap and ramp-break counts; checks nothing is counted while disabled.
module tb_axis_checker;
  import sdr_pkg::*;
  logic clk = 0, rst = 1, ena = 0, ramp_chk = 1, take = 0, valid = 0;
  iq_t data;
  logic [31:0] samples;
  logic [15:0] gaps, seq_err;
  int checks = 0, failures = 0;

  axis_checker dut (.clk, .rst, .ena, .ramp_chk, .take, .valid, .data, .samples, .gaps, .seq_err);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v = 100, e_s = 0, e_g = 0, e_e = 0;
    data = '0;
    @(negedge clk) rst = 0;
    // disabled: nothing counts
    take = 1; valid = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (samples != 0 || gaps != 0) begin failures++; $display("FAIL: counted while disabled"); end
    ena = 1;
    for (int k = 0; k < 200; k++) begin
      take = (k % 2 == 0);
      valid = ($urandom_range(0, 9) != 0);
      if (k == 50 || k == 120) v += 7;
      data.i = 16'(v);
      if (take && !valid) e_g++;
      if (take && valid) begin
        e_s++;
        if (k == 50 || k == 120) e_e++;
        v++;
      end
      @(negedge clk);
    end
    checks++;
    if (samples != 32'(e_s)) begin failures++; $display("FAIL: samples %0d exp %0d", samples, e_s); end
    checks++;
    if (gaps != 16'(e_g)) begin failures++; $display("FAIL: gaps %0d exp %0d", gaps, e_g); end
    checks++;
    if (seq_err != 16'(e_e)) begin failures++; $display("FAIL: seq_err %0d exp %0d", seq_err, e_e); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
