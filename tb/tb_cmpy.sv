// tb_cmpy: random complex products against a reference computed here, including the
// saturating corner (-1)*(-1); checks the two-clock latency (accepting edge to the edge that takes the result) and that the pipeline holds its
// output under back-pressure.
module tb_cmpy;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  iq_t a, b, out;
  int checks = 0, failures = 0;

  cmpy dut (.clk, .rst_n, .in_valid, .in_ready, .a, .b, .out_valid, .out_ready, .out);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rs(input longint v);   // round, shift by 15, saturate
    longint r;
    r = (v + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  iq_t qa[$], qb[$];
  int  t_in[$];
  int  cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    iq_t ea, eb;
    int  ei, eq, t0;
    ea = qa.pop_front(); eb = qb.pop_front(); t0 = t_in.pop_front();
    ei = rs(longint'(ea.i) * eb.i - longint'(ea.q) * eb.q);
    eq = rs(longint'(ea.i) * eb.q + longint'(ea.q) * eb.i);
    checks++;
    if (int'(out.i) != ei || int'(out.q) != eq) begin
      failures++; $display("FAIL: got %0d,%0d exp %0d,%0d", out.i, out.q, ei, eq);
    end
    if (t0 >= 0) begin
      checks++;
      if (int'($time) - t0 != 20) begin failures++; $display("FAIL: latency %0d ns", int'($time) - t0); end
    end
  end

  initial begin
    #12 rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      in_valid = (k < 100) ? 1'b1 : ($urandom_range(0, 3) != 0);
      out_ready = (k < 100) ? 1'b1 : ($urandom_range(0, 3) != 0);
      if (k == 0) begin a = '{q: -16'sd32768, i: -16'sd32768}; b = '{q: 16'sd0, i: -16'sd32768}; end
      else begin a = $urandom; b = $urandom; end
      #0;
      @(posedge clk);
      if (in_valid && in_ready) begin
        qa.push_back(a); qb.push_back(b); t_in.push_back(k < 100 ? int'($time) : -1);
      end
    end
    @(negedge clk) in_valid = 0; out_ready = 1;
    repeat (5) @(posedge clk);
    checks++;
    if (qa.size() != 0) begin failures++; $display("FAIL: %0d results missing", qa.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
