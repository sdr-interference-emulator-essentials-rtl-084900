// tb_async_fifo: pushes a numbered sequence from a 4 ns write clock into a 7 ns read clock with
// random valid/ready gaps, and checks that every word arrives once and in order. Then it
// stops the reader, fills the FIFO, checks that exactly DEPTH words fit and that further
// writes are refused and each refused write is counted. After the transfer the FIFO must
// report itself empty.
module tb_async_fifo;
  localparam int DEPTH = 8;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wv, wr, rv, rr;
  logic [31:0] wd, rd;
  logic [15:0] ovf;
  int checks = 0, failures = 0;

  async_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_valid(wv), .wr_ready(wr), .wr_data(wd),
    .wr_overflow(ovf), .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_valid(rv), .rd_ready(rr),
    .rd_data(rd)
  );

  always #2 wclk = ~wclk;
  always #3.5 rclk = ~rclk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_w = 0, n_r = 0;
  localparam int N = 500;
  logic rd_en = 1;

  // writer
  initial begin
    wv = 0; wd = 0;
    #20 wrst_n = 1;
    while (n_w < N) begin
      @(negedge wclk);
      wv = ($urandom_range(0, 3) != 0);
      wd = n_w;
      @(posedge wclk);
      if (wv && wr) n_w++;
    end
    @(negedge wclk) wv = 0;
  end

  // reader
  always @(negedge rclk) rr = rd_en && ($urandom_range(0, 2) != 0);
  always @(posedge rclk) if (rrst_n && rv && rr) begin
    checks++;
    if (rd !== 32'(n_r)) begin failures++; $display("FAIL: got %0d expected %0d", rd, n_r); end
    n_r++;
  end

  initial begin
    rr = 0;
    #20 rrst_n = 1;
    wait (n_r == N);
    // drained: nothing more to read
    repeat (5) @(posedge rclk);
    checks++;
    if (rv) begin failures++; $display("FAIL: valid data reported in an empty FIFO"); end
    // fill test
    rd_en = 0;
    repeat (5) @(posedge rclk);
    begin
      int accepted = 0, refused = 0;
      logic [15:0] ovf0;
      ovf0 = ovf;
      for (int k = 0; k < DEPTH + 4; k++) begin
        @(negedge wclk); wv = 1; wd = 32'hA000 + k;
        @(posedge wclk);
        if (wr) accepted++; else refused++;
      end
      @(negedge wclk) wv = 0;
      checks++;
      if (accepted != DEPTH) begin failures++; $display("FAIL: accepted %0d words, expected %0d", accepted, DEPTH); end
      checks++;
      if (ovf - ovf0 != 16'(refused)) begin failures++; $display("FAIL: overflow %0d, refused %0d", ovf, refused); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
