// tb_upsampler: sends a numbered sequence for factors 1, 4 and 5 with random back-pressure
// and checks that each sample is followed by exactly U-1 zeros, in order.
module tb_upsampler;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] factor = 1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  iq_t in, out;
  int checks = 0, failures = 0;
  bit bp = 0;
  int u_cur = 1, n_out = 0;

  upsampler dut (.clk, .rst_n, .factor, .in_valid, .in_ready, .in, .out_valid, .out_ready, .out);

  always #5 clk = ~clk;
  always @(negedge clk) out_ready <= bp ? ($urandom_range(0, 2) != 0) : 1'b1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int e;
    e = ((n_out % u_cur) == 0) ? 100 + n_out / u_cur : 0;
    checks++;
    if (int'(out.i) != e || int'(out.q) != -e) begin
      failures++; $display("FAIL U=%0d out %0d: got %0d exp %0d", u_cur, n_out, out.i, e);
    end
    n_out++;
  end

  task automatic send(input int v);
    bit ok;
    @(negedge clk); #1;
    in.i = 16'(v); in.q = 16'(-v); in_valid = 1;
    forever begin
      #1 ok = in_ready;
      @(posedge clk);
      if (ok) break;
      @(negedge clk); #1;
    end
    #1 in_valid = 0;
  endtask

  initial begin
    int us[3] = '{1, 4, 5};
    #12 rst_n = 1;
    foreach (us[t]) begin
      factor = 16'(us[t]);
      u_cur = us[t]; n_out = 0; bp = 1;
      for (int k = 0; k < 20; k++) send(100 + k);
      repeat (us[t] * 4 + 4) @(posedge clk);
      bp = 0;
      repeat (us[t] + 3) @(posedge clk);
      checks++;
      if (n_out != 20 * us[t]) begin failures++; $display("FAIL U=%0d: %0d outputs", u_cur, n_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
