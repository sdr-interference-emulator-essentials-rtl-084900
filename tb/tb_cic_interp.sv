// tb_cic_interp: drives random I/Q samples through the interpolator for several rates (power
// of two and not) and compares every output with a direct convolution computed here: the
// input with R-1 zeros after each sample, convolved with the N-fold convolution of a length-R
// boxcar and scaled by 2**((N-1)*ceil(log2 R)) with rounding and saturation. Random
// back-pressure is applied; the count checks R outputs per input.
module tb_cic_interp;
  import sdr_pkg::*;
  localparam int NS = 4;
  logic clk = 0, rst_n = 0;
  logic [7:0] rate;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  iq_t in, out;
  int checks = 0, failures = 0;

  cic_interp #(.N_STAGES(NS)) dut (.clk, .rst_n, .rate, .in_valid, .in_ready, .in,
                                  .out_valid, .out_ready, .out);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint xi[$], xq[$];
  longint h[];
  int     n_out;

  function automatic int rs(input longint v, input int sh);
    longint r;
    r = (sh == 0) ? v : ((v + (64'sd1 <<< (sh - 1))) >>> sh);
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  task automatic make_h(input int r);
    longint t[];
    h = new[1]; h[0] = 1;
    for (int s = 0; s < NS; s++) begin
      t = new[h.size() + r - 1];
      foreach (t[k]) t[k] = 0;
      foreach (h[k]) for (int j = 0; j < r; j++) t[k + j] += h[k];
      h = t;
    end
  endtask

  int r_cur, sh_cur;
  bit bp = 0;
  always @(negedge clk) out_ready <= bp ? ($urandom_range(0, 4) != 0) : 1'b1;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    longint ai, aq;
    int n;
    n = n_out;
    ai = 0; aq = 0;
    foreach (h[k]) if (n - k >= 0 && ((n - k) % r_cur) == 0 && (n - k) / r_cur < xi.size()) begin
      ai += h[k] * xi[(n - k) / r_cur];
      aq += h[k] * xq[(n - k) / r_cur];
    end
    checks++;
    if (int'(out.i) != rs(ai, sh_cur) || int'(out.q) != rs(aq, sh_cur)) begin
      failures++;
      $display("FAIL R=%0d out %0d: got %0d,%0d exp %0d,%0d", r_cur, n_out, out.i, out.q, rs(ai, sh_cur), rs(aq, sh_cur));
    end
    n_out++;
  end

  initial begin
    int rates[4] = '{4, 8, 5, 128};
    foreach (rates[t]) begin
      int nin;
      r_cur = rates[t];
      sh_cur = (NS - 1) * $clog2(r_cur);
      make_h(r_cur);
      xi.delete(); xq.delete(); n_out = 0;
      rst_n = 0; rate = 8'(r_cur);
      repeat (2) @(negedge clk);
      rst_n = 1; bp = 1;
      nin = 40;
      for (int k = 0; k < nin; k++) begin
        bit ok;
        @(negedge clk); #1;
        in.i = (t == 3) ? 16'sd30000 : 16'($urandom_range(0, 20000) - 10000);
        in.q = (t == 3) ? -16'sd30000 : 16'($urandom_range(0, 2000) - 1000);
        in_valid = 1;
        forever begin
          #1 ok = in_ready;
          @(posedge clk);
          if (ok) break;
          @(negedge clk); #1;
        end
        xi.push_back(in.i); xq.push_back(in.q);
      end
      @(negedge clk) in_valid = 0; bp = 0;
      repeat (r_cur + 4) @(posedge clk);
      checks++;
      if (n_out != 40 * r_cur) begin failures++; $display("FAIL R=%0d: %0d outputs, expected %0d", r_cur, n_out, 40 * r_cur); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
