// tb_packetizer: sends 3.5 packets of numbered samples with random back-pressure and checks
// the {Q, I} word layout, the order, and that tlast is set on exactly every PKT_LEN-th word.
module tb_packetizer;
  import sdr_pkg::*;
  localparam int PL = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, m_valid, m_ready = 1, m_last;
  logic [31:0] m_data;
  iq_t in;
  int checks = 0, failures = 0, n_out = 0, n_last = 0;

  packetizer #(.PKT_LEN(PL)) dut (.clk, .rst_n, .in_valid, .in_ready, .in, .m_valid, .m_ready,
                                  .m_data, .m_last);

  always #5 clk = ~clk;
  always @(negedge clk) m_ready <= ($urandom_range(0, 2) != 0);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    checks++;
    if (m_data !== {16'(n_out ^ 16'h5555), 16'(n_out)} || m_last !== ((n_out % PL) == PL - 1)) begin
      failures++; $display("FAIL word %0d: %h last %b", n_out, m_data, m_last);
    end
    if (m_last) n_last++;
    n_out++;
  end

  task automatic send(input int v);
    bit ok;
    @(negedge clk); #1;
    in.i = 16'(v); in.q = 16'(v ^ 16'h5555); in_valid = 1;
    forever begin
      #1 ok = in_ready;
      @(posedge clk);
      if (ok) break;
      @(negedge clk); #1;
    end
    #1 in_valid = 0;
  endtask

  initial begin
    #12 rst_n = 1;
    for (int k = 0; k < PL * 7 / 2; k++) send(k);
    repeat (10) @(posedge clk);
    checks++;
    if (n_out != PL * 7 / 2 || n_last != 3) begin failures++; $display("FAIL: %0d words %0d packets", n_out, n_last); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
