// tb_fir: checks the reset coefficient set (a single 0x7FFF tap), then reloads a random set
// through the reload port, checks that it takes effect only on the control write, and compares
// every output with a convolution computed here. Random back-pressure; one-clock latency is
// checked while the output is always taken.
module tb_fir;
  import sdr_pkg::*;
  localparam int NT = 8;
  logic clk = 0, rst_n = 0;
  logic rld_valid = 0, cfg_valid = 0;
  logic [15:0] rld_data = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  iq_t in, out;
  int checks = 0, failures = 0;
  bit bp = 0;

  fir #(.N_TAPS(NT)) dut (.clk, .rst_n, .rld_valid, .rld_data, .cfg_valid, .in_valid, .in_ready,
                          .in, .out_valid, .out_ready, .out);

  always #5 clk = ~clk;
  always @(negedge clk) out_ready <= bp ? ($urandom_range(0, 3) != 0) : 1'b1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rs(input longint v);
    longint r;
    r = (v + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  longint c[NT];
  longint xi[$], xq[$];
  int n_out = 0;
  time t_acc[$];

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    longint ai, aq;
    time t0;
    ai = 0; aq = 0;
    for (int k = 0; k < NT; k++) if (n_out - k >= 0) begin
      ai += c[k] * xi[n_out - k]; aq += c[k] * xq[n_out - k];
    end
    checks++;
    if (int'(out.i) != rs(ai) || int'(out.q) != rs(aq)) begin
      failures++; $display("FAIL out %0d: got %0d,%0d exp %0d,%0d", n_out, out.i, out.q, rs(ai), rs(aq));
    end
    t0 = t_acc.pop_front();
    if (!bp) begin
      checks++;
      if ($time - t0 != 10) begin failures++; $display("FAIL: latency %0t", $time - t0); end
    end
    n_out++;
  end

  task automatic send(input iq_t v);
    bit ok;
    @(negedge clk); #1;
    in = v; in_valid = 1;
    forever begin
      #1 ok = in_ready;
      @(posedge clk);
      if (ok) break;
      @(negedge clk); #1;
    end
    xi.push_back(v.i); xq.push_back(v.q); t_acc.push_back($time);
    #1 in_valid = 0;
  endtask

  initial begin
    for (int k = 0; k < NT; k++) c[k] = (k == 0) ? 32767 : 0;
    #12 rst_n = 1;
    for (int k = 0; k < 50; k++) send(iq_t'($urandom));
    // reload: the old set must stay active until the control write
    for (int k = 0; k < NT; k++) begin
      @(negedge clk);
      rld_valid = 1; rld_data = 16'($urandom_range(0, 16000) - 8000);
      @(negedge clk); rld_valid = 0;
      if (k == 0) begin
        // one sample with the old set still active in between reload writes
        send(iq_t'($urandom));
      end
      c_new[k] = longint'(signed'(rld_data));
    end
    for (int k = 0; k < 10; k++) send(iq_t'($urandom));
    @(negedge clk) cfg_valid = 1;
    @(negedge clk) cfg_valid = 0;
    for (int k = 0; k < NT; k++) c[k] = c_new[k];
    bp = 1;
    for (int k = 0; k < 300; k++) send(iq_t'($urandom));
    bp = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (n_out != xi.size()) begin failures++; $display("FAIL: %0d outputs for %0d inputs", n_out, xi.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  longint c_new[NT];
endmodule
