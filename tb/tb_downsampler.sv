// tb_downsampler: sends a numbered sequence for factors 1, 3 and 7 with random back-pressure
// and checks that exactly the samples 0, R, 2R, ... come out, in order.
module tb_downsampler;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] factor = 1;
  logic factor_wr = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  iq_t in, out;
  int checks = 0, failures = 0;
  bit bp = 0;
  int r_cur = 1, n_out = 0;

  downsampler dut (.clk, .rst_n, .factor, .factor_wr, .in_valid, .in_ready, .in,
                   .out_valid, .out_ready, .out);

  always #5 clk = ~clk;
  always @(negedge clk) out_ready <= bp ? ($urandom_range(0, 2) != 0) : 1'b1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (int'(out.i) != n_out * r_cur || int'(out.q) != -n_out * r_cur) begin
      failures++; $display("FAIL R=%0d: got %0d exp %0d", r_cur, out.i, n_out * r_cur);
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
    int rs[3] = '{1, 3, 7};
    #12 rst_n = 1;
    foreach (rs[t]) begin
      @(negedge clk); factor = 16'(rs[t]); factor_wr = 1;
      @(negedge clk); factor_wr = 0;
      r_cur = rs[t]; n_out = 0; bp = 1;
      for (int k = 0; k < 20 * rs[t]; k++) send(k);
      bp = 0;
      repeat (3) @(posedge clk);
      checks++;
      if (n_out != 20) begin failures++; $display("FAIL R=%0d: %0d outputs", r_cur, n_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
