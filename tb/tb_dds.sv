// tb_dds: steps the oscillator with several phase increments and compares each output with
// round(32767*cos), round(32767*sin) of the table phase, computed here with real arithmetic.
// Also checks that the phase holds while step is low.
module tb_dds;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0, step = 0;
  logic [31:0] pinc = 0, phase;
  iq_t out;
  int checks = 0, failures = 0;

  dds dut (.clk, .rst_n, .pinc, .step, .out, .phase);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_val(input logic [31:0] ph, input bit want_cos);
    real a;
    int idx;
    idx = int'(ph[31:22]);
    a = 2.0 * 3.14159265358979 * real'(idx) / 1024.0;
    return want_cos ? int'($rtoi($floor(32767.0 * $cos(a) + 0.5))) : int'($rtoi($floor(32767.0 * $sin(a) + 0.5)));
  endfunction

  initial begin
    logic [31:0] exp_ph;
    #12 rst_n = 1;
    exp_ph = 0;
    for (int t = 0; t < 4; t++) begin
      logic [31:0] pi;
      pi = (t == 0) ? 32'h0040_0000 : (t == 1) ? 32'h0123_4567 : (t == 2) ? 32'hF000_0000 : $urandom;
      @(negedge clk); pinc = pi; step = 1;
      for (int k = 0; k < 300; k++) begin
        @(negedge clk);
        exp_ph += pi;
        checks++;
        if (phase !== exp_ph) begin failures++; $display("FAIL: phase %h exp %h", phase, exp_ph); end
        checks++;
        if ((int'(out.i) - ref_val(phase, 1)) > 1 || (int'(out.i) - ref_val(phase, 1)) < -1 ||
            (int'(out.q) - ref_val(phase, 0)) > 1 || (int'(out.q) - ref_val(phase, 0)) < -1) begin
          failures++;
          $display("FAIL: ph %h got %0d,%0d exp %0d,%0d", phase, out.i, out.q, ref_val(phase,1), ref_val(phase,0));
        end
      end
      step = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (phase !== exp_ph) begin failures++; $display("FAIL: phase moved without step"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
